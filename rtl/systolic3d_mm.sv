// systolic3d_mm -- 3D systolic array for the product C = A*B of two N x N
// floating-point matrices.
//
// N x N cell stacks stand in the X-Y plane, each PLANES = 5 planes deep along
// Z, so the array has 5*N*N cells.  Row i of A enters at the +X edge of row i
// and moves one stack per cycle towards -X; column j of B enters at the bottom
// (+Y edge, row N-1) of column j and moves one stack per cycle towards row 0.
// Both are constant streams: stacks only read and forward them.  Each stack
// computes its c(i,j) along Z in five pipelined atomic steps (see
// cell_stack), so nothing but A and B crosses the X-Y plane and the result
// leaves every stack at its back face.
//
// Host side: in each of N cycles with in_valid high the host presents column k
// of A (a_col[i] = a(i,k)) and row k of B (b_row[j] = b(k,j)), k = 0..N-1 in
// order.  A counter marks the first and last k; operand_skew delays row i of A
// by N-1-i cycles and column j of B by N-1-j cycles, so that a(i,k) and b(k,j)
// meet in stack (i,j) in cycle k + (N-1-i) + (N-1-j) after the first column.
// A new product may start in the cycle after the last column of the previous
// one.
//
// Timing: if the first column is presented in cycle 0, stack (0,0) receives
// its last pair in cycle 3N-3 and its c leaves plane 5 so that done is high in
// cycle 3N + PLANES - 3, the latency T3 = (3N + M - 3) atomic cycles of the
// architecture.  c_valid[i][j] pulses when c(i,j) is final; c_mat[i][j] holds
// it until the same stack finishes its next c.  When products are issued
// back to back, stacks near (N-1,N-1) finish the next product before stack
// (0,0) finishes the current one, so collect results by c_valid, or leave at
// least 2N-2 idle cycles between products if c_mat is read at done.
//
// The grid, the plane decomposition and the flow directions follow the
// architecture.  The host interface, the tag counter and the number format
// (see fp3d_pkg) are this design's own.
module systolic3d_mm
  import fp3d_pkg::*;
#(
  parameter int unsigned N = 3
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  fp_t  a_col   [N],
  input  fp_t  b_row   [N],
  output fp_t  c_mat   [N][N],
  output logic c_valid [N][N],
  output logic done
);

  localparam int unsigned KW = (N > 1) ? $clog2(N) : 1;
  localparam int unsigned AW = $bits(tag_t) + $bits(fp_t);

  // ---- position of the current column/row within the product ----
  logic [KW-1:0] k_q;
  tag_t          tag_host;

  always_comb begin
    tag_host.valid = in_valid;
    tag_host.first = in_valid && (k_q == '0);
    tag_host.last  = in_valid && (k_q == KW'(N - 1));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        k_q <= '0;
    else if (in_valid) k_q <= (k_q == KW'(N - 1)) ? '0 : k_q + 1'b1;
  end

  // ---- stagger the streams at the array edges ----
  logic [AW-1:0]        a_lane_in  [N];
  logic [AW-1:0]        a_lane_out [N];
  logic [$bits(fp_t)-1:0] b_lane_in  [N];
  logic [$bits(fp_t)-1:0] b_lane_out [N];

  for (genvar l = 0; l < N; l++) begin : g_edge
    // a carries the tag; a lane that is not valid carries a zero word
    assign a_lane_in[l] = {tag_host, in_valid ? a_col[l] : fp_t'('0)};
    assign b_lane_in[l] = in_valid ? b_row[l] : '0;
  end

  operand_skew #(.N(N), .W(AW)) u_skew_a (
    .clk, .rst_n, .din(a_lane_in), .dout(a_lane_out)
  );
  operand_skew #(.N(N), .W($bits(fp_t))) u_skew_b (
    .clk, .rst_n, .din(b_lane_in), .dout(b_lane_out)
  );

  // ---- the grid of cell stacks ----
  // a_h[i][j] : A word entering stack (i,j) from the +X side (j = N is the edge)
  // b_v[i][j] : B word entering stack (i,j) from the +Y side (i = N is the edge)
  fp_t  a_h   [N][N+1];
  tag_t tag_h [N][N+1];
  fp_t  b_v   [N+1][N];

  for (genvar i = 0; i < N; i++) begin : g_row_edge
    assign {tag_h[i][N], a_h[i][N]} = a_lane_out[i];
  end
  for (genvar j = 0; j < N; j++) begin : g_col_edge
    assign b_v[N][j] = b_lane_out[j];
  end

  for (genvar i = 0; i < N; i++) begin : g_row
    for (genvar j = 0; j < N; j++) begin : g_col
      cell_stack u_cell (
        .clk, .rst_n,
        .a_in     (a_h[i][j+1]),
        .a_tag_in (tag_h[i][j+1]),
        .b_in     (b_v[i+1][j]),
        .a_out    (a_h[i][j]),
        .a_tag_out(tag_h[i][j]),
        .b_out    (b_v[i][j]),
        .c_valid  (c_valid[i][j]),
        .c        (c_mat[i][j])
      );
    end
  end

  // Stack (0,0) is the last to receive its operands.
  assign done = c_valid[0][0];

  // The accumulator of a stack is sized for at most MAX_TERMS terms.
  initial assert (N >= 1 && N <= MAX_TERMS)
    else $error("systolic3d_mm: N=%0d outside 1..%0d", N, MAX_TERMS);

endmodule
