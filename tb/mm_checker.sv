// mm_checker -- stimulus and scoreboard for the whole array, shared by the
// end-to-end testbenches.  It plays the host: it sends a series of matrix
// products through the array's column/row port, computes every expected C with
// reals, and checks each c(i,j) when its stack reports it.  The series covers
// the behaviour the array has:
//   * staggered entry of A and B and the T3 = 3N + M - 3 cycle latency of an
//     isolated product (checked on done),
//   * products issued back to back, and products with idle host cycles
//     between columns (a slow host),
//   * a later term with a larger exponent than the running sum, so the sum is
//     realigned inside a stack,
//   * zero operands, results that saturate and results that flush to zero.
// Each of these is counted, and a case that never happened counts as a
// failure.  Exact small-integer products (one is the 3x3 example 1..9 times
// 9..1) must come out bit-exact.
module mm_checker
  import fp3d_pkg::*;
  import tb_fp_pkg::*;
#(
  parameter int unsigned N      = 3,
  parameter int unsigned NPROD  = 40
) (
  input  logic clk,
  input  logic rst_n,
  output logic in_valid,
  output fp_t  a_col   [N],
  output fp_t  b_row   [N],
  input  fp_t  c_mat   [N][N],
  input  logic c_valid [N][N],
  input  logic done,
  output logic finished,
  output int   checks,
  output int   failures
);

  localparam int T3 = 3 * int'(N) + int'(PLANES) - 3;

  typedef enum int { K_EXAMPLE, K_INT, K_RAND, K_SPREAD, K_ZERO, K_OVER, K_UNDER } kind_e;

  typedef struct {
    real v;
    real tol;
    int  prod;
  } exp_t;

  typedef struct {
    int first_cyc;
    int last_cyc;
    bit gapless;
    int prod;
  } run_t;

  exp_t exp_q [N][N][$];
  run_t run_q [$];
  int   cyc;
  int   n_iso, n_b2b, n_gap, n_realign, n_zero, n_sat, n_flush, n_lat;
  int   results;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  always @(posedge clk) cyc <= cyc + 1;

  // ---------------- scoreboard ----------------
  always @(negedge clk) begin
    if (rst_n) begin
      for (int i = 0; i < int'(N); i++) begin
        for (int j = 0; j < int'(N); j++) begin
          if (c_valid[i][j]) begin
            exp_t e;
            real  r;
            results++;
            if (exp_q[i][j].size() == 0) begin
              check(0, $sformatf("unexpected result at (%0d,%0d)", i, j));
            end else begin
              e = exp_q[i][j].pop_front();
              r = fp2real(c_mat[i][j]);
              if (e.tol < 0.0) begin
                // saturation expected
                check(c_mat[i][j].exp == '1 && c_mat[i][j].frac == '1 && (r < 0.0) == (e.v < 0.0),
                      $sformatf("product %0d c(%0d,%0d) should saturate, got %e", e.prod, i, j, r));
              end else begin
                check(fabs(r - e.v) <= e.tol,
                      $sformatf("product %0d c(%0d,%0d) = %e want %e", e.prod, i, j, r, e.v));
              end
            end
          end
        end
      end
      if (done) begin
        run_t rn;
        if (run_q.size() == 0) check(0, "done without a product in flight");
        else begin
          rn = run_q.pop_front();
          check(cyc - rn.last_cyc == 2 * int'(N) + int'(PLANES) - 2,
                $sformatf("product %0d: done %0d cycles after its last column", rn.prod, cyc - rn.last_cyc));
          if (rn.gapless) begin
            n_lat++;
            check(cyc - rn.first_cyc == T3,
                  $sformatf("product %0d: latency %0d cycles, want 3N+M-3 = %0d", rn.prod, cyc - rn.first_cyc, T3));
          end
        end
      end
    end
  end

  // ---------------- host ----------------
  fp_t A [N][N];
  fp_t B [N][N];

  function automatic fp_t gen(kind_e kind, int i, int j, bit is_a);
    fp_t x;
    case (kind)
      K_EXAMPLE: x = is_a ? int2fp(i * int'(N) + j + 1) : int2fp(int'(N * N) - (i * int'(N) + j));
      K_INT:     x = int2fp(int'($urandom % 31) - 15);
      K_RAND:    x = rand_fp(-8, 8);
      K_SPREAD:  x = rand_fp(-30, 30);
      K_ZERO: begin
        x = rand_fp(-4, 4);
        if ($urandom % 3 == 0) x.exp = '0;
        if (is_a && i == 0) x.exp = '0;       // a whole zero row of A
      end
      K_OVER: begin                            // |a*b| >= 2**160: every sum saturates
        x = rand_fp(80, 90);
        x.sign = is_a ? 1'b0 : 1'(j);          // sign fixed per column: no cancellation
      end
      K_UNDER: begin                           // |a*b| <= 2**-158: every sum flushes
        x = rand_fp(-90, -80);
      end
      default: x = '0;
    endcase
    return x;
  endfunction

  initial begin
    kind_e kind;
    bit    gaps, iso;
    int    first_c, last_c;
    real   ref_c, sum_abs, p, tol;
    int    emax, e;
    bit    have;
    in_valid = 1'b0;
    for (int l = 0; l < int'(N); l++) begin a_col[l] = '0; b_row[l] = '0; end
    finished = 1'b0;
    checks = 0; failures = 0;
    n_iso = 0; n_b2b = 0; n_gap = 0; n_realign = 0; n_zero = 0; n_sat = 0; n_flush = 0; n_lat = 0;
    results = 0;
    @(posedge rst_n);
    repeat (2) @(posedge clk);

    for (int pi = 0; pi < int'(NPROD); pi++) begin
      case (pi % 8)
        0: kind = (pi == 0) ? K_EXAMPLE : K_INT;
        1: kind = K_RAND;
        2: kind = K_SPREAD;
        3: kind = K_ZERO;
        4: kind = K_OVER;
        5: kind = K_UNDER;
        6: kind = K_SPREAD;
        default: kind = K_RAND;
      endcase
      iso  = (pi % 4 == 0);                 // isolated: the array drains first
      gaps = (pi % 5 == 2);                 // slow host: idle cycles between columns

      for (int i = 0; i < int'(N); i++)
        for (int j = 0; j < int'(N); j++) begin
          A[i][j] = gen(kind, i, j, 1'b1);
          B[i][j] = gen(kind, i, j, 1'b0);
        end

      // expected C, and the cases this product exercises
      for (int i = 0; i < int'(N); i++) begin
        for (int j = 0; j < int'(N); j++) begin
          exp_t ex;
          ref_c = 0.0; sum_abs = 0.0; have = 0; emax = 0;
          for (int k = 0; k < int'(N); k++) begin
            if (A[i][k].exp == 0 || B[k][j].exp == 0) n_zero++;
            else begin
              e = int'(A[i][k].exp) + int'(B[k][j].exp);
              if (have && e > emax) n_realign++;
              if (!have || e > emax) emax = e;
              have = 1;
            end
            p = fp2real(A[i][k]) * fp2real(B[k][j]);
            ref_c += p; sum_abs += fabs(p);
          end
          ex.prod = pi;
          ex.v    = ref_c;
          if (kind == K_OVER) begin
            ex.tol = -1.0; n_sat++;
          end else if (kind == K_UNDER) begin
            ex.v = 0.0; ex.tol = 0.0; n_flush++;
          end else if (kind == K_EXAMPLE || kind == K_INT) begin
            ex.tol = 0.0;
          end else begin
            ex.tol = fabs(ref_c) * pow2(-22) + sum_abs * pow2(-40);
          end
          exp_q[i][j].push_back(ex);
        end
      end

      if (iso) begin
        n_iso++;
        @(negedge clk);
        in_valid = 1'b0;
        while (run_q.size() != 0) @(negedge clk);
        repeat (2) @(negedge clk);
      end else if (pi > 0 && !gaps) n_b2b++;
      if (gaps) n_gap++;

      first_c = 0; last_c = 0;
      for (int k = 0; k < int'(N); k++) begin
        if (gaps && k > 0) begin
          @(negedge clk);
          in_valid = 1'b0;
          for (int l = 0; l < int'(N); l++) begin a_col[l] = rand_fp(0, 2); b_row[l] = rand_fp(0, 2); end
          repeat (int'($urandom % 3)) @(negedge clk);
        end
        @(negedge clk);
        in_valid = 1'b1;
        for (int l = 0; l < int'(N); l++) begin
          a_col[l] = A[l][k];
          b_row[l] = B[k][l];
        end
        if (k == 0) first_c = cyc;
        last_c = cyc;
      end
      run_q.push_back('{first_cyc: first_c, last_cyc: last_c, gapless: !gaps, prod: pi});
      // in_valid stays high: a following product may start in the next cycle
    end
    @(negedge clk);
    in_valid = 1'b0;

    // drain
    while (run_q.size() != 0) @(negedge clk);
    repeat (T3 + 2) @(negedge clk);

    for (int i = 0; i < int'(N); i++)
      for (int j = 0; j < int'(N); j++)
        check(exp_q[i][j].size() == 0, $sformatf("c(%0d,%0d): %0d results missing", i, j, exp_q[i][j].size()));
    check(results == int'(NPROD * N * N), $sformatf("%0d results, want %0d", results, NPROD * N * N));

    $display("cases: isolated=%0d back_to_back=%0d host_gaps=%0d latency_checked=%0d realign=%0d zero_operand=%0d saturate=%0d flush=%0d",
             n_iso, n_b2b, n_gap, n_lat, n_realign, n_zero, n_sat, n_flush);
    check(n_iso > 0, "no isolated product");
    check(n_b2b > 0, "no back-to-back product");
    check(n_gap > 0, "no product with host gaps");
    check(n_lat > 0, "latency never checked");
    check(n_realign > 0, "running sum never realigned");
    check(n_zero > 0, "no zero operand");
    check(n_sat > 0, "no saturated result");
    check(n_flush > 0, "no flushed result");
    finished = 1'b1;
  end

endmodule
