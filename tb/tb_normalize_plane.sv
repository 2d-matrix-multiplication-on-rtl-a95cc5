// tb_normalize_plane -- checks plane 5 (normalization).  Random running sums
// and exponents are converted; the output word, read back as a real, must
// match acc * 2**(emax - bias - (PROD_W-2)) to within one unit of its last
// fraction bit, truncated toward zero.  Results below the smallest normal
// number must give zero, results above the largest must saturate.  c_valid
// must pulse only for a term marked last, and c must hold otherwise.
module tb_normalize_plane;
  import fp3d_pkg::*;
  import tb_fp_pkg::*;

  logic clk = 0, rst_n = 0;
  sum_t in;
  logic c_valid;
  fp_t  c, held;
  int   checks = 0, failures = 0;
  int   n_norm = 0, n_under = 0, n_over = 0, n_zero = 0;

  normalize_plane dut (.clk, .rst_n, .in, .c_valid, .c);

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
    real    v, r, av;
    longint acc;
    int     e, nb;
    in = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 800; n++) begin
      @(negedge clk);
      nb  = 1 + int'($urandom % (ACC_W - 1));
      acc = longint'({$urandom, $urandom}) >>> (64 - nb);
      if (n % 50 == 0) acc = 0;
      e = (n % 5 == 0) ? int'($urandom % 500) - 100 : 60 + int'($urandom % 120);
      in.acc  = ACC_W'(acc);
      in.emax = XE_W'(e);
      in.tag  = {1'b1, 1'b0, (n % 3 != 1)};
      held = c;
      @(posedge clk); #1;
      if (!in.tag.last) begin
        check(!c_valid && c == held, "no output without last");
        continue;
      end
      check(c_valid, "c_valid on last");
      v  = real'(acc) * pow2(e - int'(BIAS) - int'(PROD_W - 2));
      r  = fp2real(c);
      av = fabs(v);
      if (acc == 0) begin
        n_zero++;
        check(c == '0, "zero sum gives +0");
      end else if (av < pow2(1 - int'(BIAS))) begin
        n_under++;
        check(c.exp == 0 && c.frac == 0 && c.sign == (acc < 0), "underflow flushes to zero");
      end else if (av >= pow2(256 - int'(BIAS))) begin
        n_over++;
        check(c.exp == '1 && c.frac == '1 && c.sign == (acc < 0), "overflow saturates");
      end else begin
        n_norm++;
        check(fabs(v - r) <= av * pow2(-int'(FRAC_W)), $sformatf("value %e want %e", r, v));
        check(fabs(r) <= av, "truncated toward zero");
        check(c.sign == (acc < 0), "sign");
      end
    end
    checks++;
    if (n_norm == 0 || n_under == 0 || n_over == 0 || n_zero == 0) begin
      failures++;
      $display("FAIL case not covered: norm=%0d under=%0d over=%0d zero=%0d", n_norm, n_under, n_over, n_zero);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
