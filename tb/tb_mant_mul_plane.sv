// tb_mant_mul_plane -- checks plane 1 (mantissa multiplication) against a
// product of the significands computed in 64-bit integers, plus the sign,
// zero flag, exponent pass-through, tag and the one-cycle latency.
module tb_mant_mul_plane;
  import fp3d_pkg::*;
  import tb_fp_pkg::*;

  logic clk = 0, rst_n = 0;
  tag_t tag_in;
  fp_t  a, b;
  mul_t out;
  int   checks = 0, failures = 0;

  mant_mul_plane dut (.clk, .rst_n, .tag_in, .a, .b, .out);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
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

  initial begin
    longint unsigned exp_mant;
    tag_in = '0; a = '0; b = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      a = rand_fp(-20, 20);
      b = rand_fp(-20, 20);
      if (n % 17 == 3) a.exp = '0;
      if (n % 23 == 5) b.exp = '0;
      tag_in = tag_t'(3'($urandom));
      @(posedge clk); #1;
      exp_mant = (longint'(1) << FRAC_W | longint'(a.frac)) * (longint'(1) << FRAC_W | longint'(b.frac));
      check(out.mant == PROD_W'(exp_mant), $sformatf("mant %h", out.mant));
      check(out.sign == (a.sign != b.sign), "sign");
      check(out.zero == (a.exp == 0 || b.exp == 0), "zero");
      check(out.ea == a.exp && out.eb == b.exp, "exponents");
      check(out.tag == tag_in, "tag");
    end
    // latency: output holds the previous cycle's input until the next edge
    @(negedge clk);
    a = int2fp(3); b = int2fp(5); tag_in = 3'b111;
    #1 check(out.mant != PROD_W'(longint'(3 << 22) * longint'(5 << 21)) || out.tag != 3'b111, "register stage");
    @(posedge clk); #1;
    check(out.mant == PROD_W'(longint'(3 << 22) * longint'(5 << 21)), "3*5 significands");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
