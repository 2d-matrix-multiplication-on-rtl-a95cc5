// tb_mant_add_plane -- checks plane 4 (mantissa addition) against a 64-bit
// integer model of the running sum: load on the first term, otherwise shift
// right arithmetically by acc_shift and add.  Idle cycles must hold the sum.
module tb_mant_add_plane;
  import fp3d_pkg::*;

  logic   clk = 0, rst_n = 0;
  align_t in;
  sum_t   out;
  int     checks = 0, failures = 0;

  mant_add_plane dut (.clk, .rst_n, .in, .out);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
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
    longint model, addend;
    int     len, sh;
    in = '0;
    model = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int g = 0; g < 200; g++) begin
      len = 1 + int'($urandom % 8);
      for (int k = 0; k < len; k++) begin
        @(negedge clk);
        in.tag.valid = 1'b1;
        in.tag.first = (k == 0);
        in.tag.last  = (k == len - 1);
        in.emax      = XE_W'($urandom);
        sh           = ($urandom % 4 == 0) ? int'($urandom % (ACC_W + 1)) : 0;
        in.acc_shift = SH_W'(sh);
        addend       = longint'({$urandom, $urandom}) >>> (64 - PROD_W);   // |addend| < 2**47
        in.addend    = ACC_W'(addend);
        model = (k == 0) ? addend : ((model >>> sh) + addend);
        @(posedge clk); #1;
        check(longint'(out.acc) == model, $sformatf("acc %0d want %0d", out.acc, model));
        check(out.emax == in.emax && out.tag == in.tag, "emax/tag");
      end
      @(negedge clk);
      in.tag = '0;
      in.addend = ACC_W'(12345);
      @(posedge clk); #1;
      check(longint'(out.acc) == model && !out.tag.valid, "idle holds the sum");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
