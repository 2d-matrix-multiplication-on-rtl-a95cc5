// mant_align_plane -- plane 3 of a cell stack: mantissa alignment.
//
// The third atomic operation.  Before a product can be added to the running
// sum c, both must share one exponent.  This plane keeps the exponent of the
// running sum, emax, which is the largest product exponent seen since the
// first term of the current c.  For every product it
//   * updates emax = max(emax, product exponent) (restarts it on the first
//     term; a zero product leaves it alone),
//   * shifts the product's mantissa right by emax - product exponent and gives
//     it its sign (two's complement), and
//   * tells plane 4 how far the running sum must be shifted right because emax
//     grew.
// Because emax depends only on product exponents, which are known here, the
// loop that carries it closes inside this one plane and a new term can enter
// every cycle.  Bits shifted out at the bottom are dropped (truncation).
//
// Interface: one prod_t payload in, one align_t payload out.
// Timing: one register stage; emax is also held between terms.  Reset clears
// both.
//
// Alignment as a plane of its own follows the architecture; aligning to a
// running maximum exponent so that accumulation needs no feedback from plane 5
// is this design's own choice.
module mant_align_plane
  import fp3d_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  prod_t  in,
  output align_t out
);

  logic signed [XE_W-1:0] emax_q;     // exponent of the running sum so far
  logic signed [XE_W-1:0] emax_prev;  // emax before this term
  logic signed [XE_W-1:0] emax_new;
  logic signed [XE_W:0]   d_prod;     // emax_new - product exponent
  logic signed [XE_W:0]   d_acc;      // emax_new - emax_prev
  logic [SH_W-1:0]        sh_prod;
  logic [SH_W-1:0]        sh_acc;
  logic [ACC_W-1:0]       mag;
  align_t                 nxt;

  // Shift distance, saturated at ACC_W (everything shifted out).
  function automatic logic [SH_W-1:0] sat_shift(input logic signed [XE_W:0] d);
    if (d <= 0)                         return '0;
    else if (d >= $signed((XE_W+1)'(ACC_W))) return SH_W'(ACC_W);
    else                                return SH_W'(d);
  endfunction

  always_comb begin
    emax_prev = in.tag.first ? EXP_NONE : emax_q;
    if (!in.zero && (in.exp > emax_prev)) emax_new = in.exp;
    else                                  emax_new = emax_prev;

    d_prod  = $signed({emax_new[XE_W-1], emax_new}) - $signed({in.exp[XE_W-1], in.exp});
    d_acc   = $signed({emax_new[XE_W-1], emax_new}) - $signed({emax_prev[XE_W-1], emax_prev});
    sh_prod = sat_shift(d_prod);
    sh_acc  = sat_shift(d_acc);

    mag = in.zero ? '0 : (ACC_W'(in.mant) >> sh_prod);

    nxt.tag       = in.tag;
    nxt.emax      = emax_new;
    nxt.acc_shift = sh_acc;
    nxt.addend    = in.sign ? -$signed(mag) : $signed(mag);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out    <= '0;
      emax_q <= EXP_NONE;
    end else begin
      out <= nxt;
      if (in.tag.valid) emax_q <= emax_new;
    end
  end

endmodule
