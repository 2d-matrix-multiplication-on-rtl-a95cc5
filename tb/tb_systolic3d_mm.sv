// tb_systolic3d_mm -- end-to-end test of the 3D systolic array at its default
// size (N = 3, five planes), the 3x3 configuration of the architecture's
// example.  mm_checker plays the host and scores every element of C; see
// there for the cases covered.
module tb_systolic3d_mm;
  import fp3d_pkg::*;

  localparam int unsigned N = 3;   // the array's default size

  logic clk = 0, rst_n = 0;
  logic in_valid, done, finished;
  fp_t  a_col [N];
  fp_t  b_row [N];
  fp_t  c_mat [N][N];
  logic c_valid [N][N];
  int   checks, failures;

  systolic3d_mm dut (.clk, .rst_n, .in_valid, .a_col, .b_row, .c_mat, .c_valid, .done);

  mm_checker #(.N(N), .NPROD(64)) host (
    .clk, .rst_n, .in_valid, .a_col, .b_row, .c_mat, .c_valid, .done,
    .finished, .checks, .failures
  );

  always #5 clk = ~clk;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
  end

  initial begin
    repeat (5) @(posedge clk);
    fork
      wait (finished);
      repeat (20000) @(posedge clk);
    join_any
    if (!finished) begin
      $display("FAIL watchdog");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    end else begin
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    end
    $finish;
  end
endmodule
