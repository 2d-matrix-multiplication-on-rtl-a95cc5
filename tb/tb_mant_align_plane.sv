// tb_mant_align_plane -- checks plane 3 (mantissa alignment).  Terms are sent
// in groups (first ... last) with idle cycles in between.  For each term the
// testbench checks that emax is the largest non-zero product exponent of the
// group so far, that the running-sum shift is the growth of emax, and that
// the aligned addend, read as a real number scaled by emax, equals the
// product to within one unit of the last accumulator bit.
module tb_mant_align_plane;
  import fp3d_pkg::*;
  import tb_fp_pkg::*;

  logic   clk = 0, rst_n = 0;
  prod_t  in;
  align_t out;
  int     checks = 0, failures = 0;
  int     grows = 0;

  mant_align_plane dut (.clk, .rst_n, .in, .out);

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
    int  model_emax, prev, len, d;
    bit  have, had;
    real pv, av, ulp;
    in = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int g = 0; g < 150; g++) begin
      len  = 1 + int'($urandom % 6);
      have = 0;
      model_emax = 0;
      for (int k = 0; k < len; k++) begin
        @(negedge clk);
        in.tag.valid = 1'b1;
        in.tag.first = (k == 0);
        in.tag.last  = (k == len - 1);
        in.zero = ($urandom % 7 == 0);
        in.sign = 1'($urandom);
        in.exp  = XE_W'(100 + int'($urandom % 60));
        if ($urandom % 13 == 0) in.exp = XE_W'(int'(in.exp) - 80);   // far below: shifted out
        in.mant = {2'b01, 46'($urandom)} + ((($urandom % 2) == 1) ? 48'h4000_0000_0000 : 48'h0);
        prev = model_emax;
        had  = have;
        if (!in.zero && (!have || int'(in.exp) > model_emax)) begin
          model_emax = int'(in.exp);
          if (have) grows++;
          have = 1;
        end
        @(posedge clk); #1;
        if (have) begin
          check(int'(out.emax) == model_emax, $sformatf("emax %0d want %0d", out.emax, model_emax));
          // the running-sum shift matters only once the sum holds a non-zero term
          if (k > 0 && had) begin
            d = model_emax - prev;
            check(int'(out.acc_shift) == ((d > int'(ACC_W)) ? int'(ACC_W) : d),
                  $sformatf("acc_shift %0d want %0d", out.acc_shift, d));
          end
          pv  = in.zero ? 0.0 : (in.sign ? -1.0 : 1.0) * real'(in.mant) * pow2(int'(in.exp) - model_emax);
          av  = real'(out.addend);
          ulp = 1.0;
          check(fabs(pv - av) < ulp, $sformatf("addend %f want %f", av, pv));
          check((pv >= 0.0) ? (av <= pv) : (av >= pv), "truncation toward zero");
        end else begin
          check(out.addend == '0, "zero product gives zero addend");
        end
      end
      repeat ($urandom % 3) begin
        @(negedge clk);
        in.tag = '0;
        in.exp = XE_W'(400);   // must not disturb emax while idle
        in.zero = 1'b0;
        @(posedge clk);
      end
    end
    checks++;
    if (grows == 0) begin failures++; $display("FAIL no emax growth exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
