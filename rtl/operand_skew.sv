// operand_skew -- staggers the lanes of an input vector for the array edge.
//
// A systolic array needs a(i,k) and b(k,j) to meet in stack (i,j) in the same
// cycle.  The host presents one column of A (or one row of B) per cycle, all
// lanes together; this block delays lane l by N-1-l cycles with a chain of
// registers, so that the lane nearest the far corner of the array enters first
// and each lane after it one cycle later.  Lane N-1 passes straight through.
//
// Interface: din[N] in, dout[N] out, W bits per lane.
// Timing: lane l has a latency of N-1-l cycles.  Reset clears all registers.
//
// The staggered input streams follow the architecture's drawings; building the
// stagger into the array's edge rather than leaving it to the host is this
// design's own choice.
module operand_skew #(
  parameter int unsigned N = 3,
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] din  [N],
  output logic [W-1:0] dout [N]
);

  for (genvar l = 0; l < N; l++) begin : g_lane
    localparam int unsigned D = N - 1 - l;
    if (D == 0) begin : g_direct
      assign dout[l] = din[l];
    end else begin : g_delay
      logic [W-1:0] sr [D];
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          for (int s = 0; s < D; s++) sr[s] <= '0;
        end else begin
          sr[0] <= din[l];
          for (int s = 1; s < D; s++) sr[s] <= sr[s-1];
        end
      end
      assign dout[l] = sr[D-1];
    end
  end

endmodule
