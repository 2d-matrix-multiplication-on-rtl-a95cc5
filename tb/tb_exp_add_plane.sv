// tb_exp_add_plane -- checks plane 2 (exponent addition): the product exponent
// must equal ea + eb - bias as a signed integer over the whole exponent range,
// everything else must pass through, with one cycle of latency.
module tb_exp_add_plane;
  import fp3d_pkg::*;

  logic  clk = 0, rst_n = 0;
  mul_t  in;
  prod_t out;
  int    checks = 0, failures = 0;

  exp_add_plane dut (.clk, .rst_n, .in, .out);

  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
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
    int e_exp;
    in = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 600; n++) begin
      @(negedge clk);
      in.tag  = tag_t'(3'($urandom));
      in.zero = 1'($urandom);
      in.sign = 1'($urandom);
      in.ea   = EXP_W'($urandom);
      in.eb   = EXP_W'($urandom);
      if (n < 4) begin in.ea = (n[0]) ? '1 : 8'd1; in.eb = (n[1]) ? '1 : 8'd1; end
      in.mant = {16'($urandom), 32'($urandom)};
      @(posedge clk); #1;
      e_exp = int'(in.ea) + int'(in.eb) - 127;
      check(int'(out.exp) == e_exp, $sformatf("exp %0d+%0d -> %0d", in.ea, in.eb, out.exp));
      check(out.mant == in.mant && out.sign == in.sign && out.zero == in.zero && out.tag == in.tag,
            "pass-through");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
