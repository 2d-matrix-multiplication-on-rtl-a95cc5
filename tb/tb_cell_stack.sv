// tb_cell_stack -- drives one cell stack with dot products of random length
// (1 to 8 terms) and checks the finished c against the dot product computed
// with reals, exactly for small-integer operands and within a rounding bound
// for random ones.  Also checks that c_valid rises exactly PLANES cycles after
// the last pair enters, that c holds until the next result, and that a and b
// are passed on to the neighbours one cycle later.
module tb_cell_stack;
  import fp3d_pkg::*;
  import tb_fp_pkg::*;

  logic clk = 0, rst_n = 0;
  fp_t  a_in, b_in, a_out, b_out, c;
  tag_t a_tag_in, a_tag_out;
  logic c_valid;
  int   checks = 0, failures = 0;

  cell_stack dut (.clk, .rst_n, .a_in, .a_tag_in, .b_in, .a_out, .a_tag_out, .b_out, .c_valid, .c);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // forwarding in the X-Y plane
  fp_t  a_d, b_d;
  tag_t t_d;
  always @(posedge clk) begin
    if (rst_n) begin
      #1;
      check(a_out == a_d && b_out == b_d && a_tag_out == t_d, "a/b forwarded after one cycle");
    end
  end
  always @(negedge clk) begin
    a_d <= a_in; b_d <= b_in; t_d <= a_tag_in;
  end

  initial begin
    int  len, wait_cyc;
    bit  exact;
    real ref_c, sum_abs, p, r, tol;
    fp_t prev_c;
    a_in = '0; b_in = '0; a_tag_in = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int g = 0; g < 300; g++) begin
      len   = 1 + int'($urandom % 8);
      exact = (g % 3 == 0);
      ref_c = 0.0; sum_abs = 0.0;
      for (int k = 0; k < len; k++) begin
        @(negedge clk);
        if (exact) begin
          a_in = int2fp(int'($urandom % 41) - 20);
          b_in = int2fp(int'($urandom % 41) - 20);
        end else begin
          a_in = rand_fp(-12, 12);
          b_in = rand_fp(-12, 12);
          if ($urandom % 9 == 0) a_in.exp = '0;
        end
        a_tag_in = '{valid: 1'b1, first: (k == 0), last: (k == len - 1)};
        p = fp2real(a_in) * fp2real(b_in);
        ref_c += p; sum_abs += fabs(p);
      end
      prev_c = c;
      @(negedge clk);
      a_in = rand_fp(0, 3); b_in = rand_fp(0, 3); a_tag_in = '0;   // idle: must be ignored
      // the last pair was captured by plane 1 at the posedge before this
      // negedge; c_valid must appear after PLANES-1 further edges
      wait_cyc = 1;
      while (!c_valid && wait_cyc < 20) begin
        check(c == prev_c, "c holds until the next result");
        @(posedge clk); #1;
        wait_cyc++;
      end
      check(wait_cyc == int'(PLANES), $sformatf("latency %0d cycles, want %0d", wait_cyc, PLANES));
      r   = fp2real(c);
      tol = exact ? 0.0 : fabs(ref_c) * pow2(-22) + sum_abs * pow2(-40);
      check(fabs(r - ref_c) <= tol, $sformatf("c = %e want %e (len %0d)", r, ref_c, len));
      @(posedge clk); #1;
      check(!c_valid, "c_valid is a single pulse");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
