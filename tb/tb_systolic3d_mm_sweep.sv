// tb_systolic3d_mm_sweep -- the array at larger problem sizes: N = 8 and
// N = 25, the largest size in the architecture's latency and area plots.
// Each size gets its own array and its own mm_checker host, which checks every
// element of C and the 3N + M - 3 cycle latency at that size.
module tb_systolic3d_mm_sweep;
  import fp3d_pkg::*;

  localparam int unsigned NA = 8;
  localparam int unsigned NB = 25;

  logic clk = 0, rst_n = 0;

  logic in_valid_a, done_a, fin_a;
  fp_t  a_col_a [NA];
  fp_t  b_row_a [NA];
  fp_t  c_mat_a [NA][NA];
  logic c_valid_a [NA][NA];
  int   checks_a, failures_a;

  logic in_valid_b, done_b, fin_b;
  fp_t  a_col_b [NB];
  fp_t  b_row_b [NB];
  fp_t  c_mat_b [NB][NB];
  logic c_valid_b [NB][NB];
  int   checks_b, failures_b;

  systolic3d_mm #(.N(NA)) dut_a (.clk, .rst_n, .in_valid(in_valid_a), .a_col(a_col_a), .b_row(b_row_a),
                                 .c_mat(c_mat_a), .c_valid(c_valid_a), .done(done_a));
  mm_checker #(.N(NA), .NPROD(24)) host_a (
    .clk, .rst_n, .in_valid(in_valid_a), .a_col(a_col_a), .b_row(b_row_a), .c_mat(c_mat_a),
    .c_valid(c_valid_a), .done(done_a), .finished(fin_a), .checks(checks_a), .failures(failures_a)
  );

  systolic3d_mm #(.N(NB)) dut_b (.clk, .rst_n, .in_valid(in_valid_b), .a_col(a_col_b), .b_row(b_row_b),
                                 .c_mat(c_mat_b), .c_valid(c_valid_b), .done(done_b));
  mm_checker #(.N(NB), .NPROD(8)) host_b (
    .clk, .rst_n, .in_valid(in_valid_b), .a_col(a_col_b), .b_row(b_row_b), .c_mat(c_mat_b),
    .c_valid(c_valid_b), .done(done_b), .finished(fin_b), .checks(checks_b), .failures(failures_b)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
  end

  initial begin
    repeat (5) @(posedge clk);
    fork
      wait (fin_a && fin_b);
      repeat (50000) @(posedge clk);
    join_any
    if (!(fin_a && fin_b)) begin
      $display("FAIL watchdog");
      $display("TB_RESULT checks=%0d failures=%0d", checks_a + checks_b, failures_a + failures_b + 1);
    end else begin
      $display("TB_RESULT checks=%0d failures=%0d", checks_a + checks_b, failures_a + failures_b);
    end
    $finish;
  end
endmodule
