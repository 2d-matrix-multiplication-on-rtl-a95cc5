// exp_add_plane -- plane 2 of a cell stack: exponent addition.
//
// The second atomic operation.  The exponent of a*b is the sum of the two
// biased exponents less one bias.  The sum is kept in a signed field three bits
// wider than the word's exponent, so that products too small or too large for
// the word survive until normalization decides what to do with them.
// Everything else passes through.
//
// Interface: one mul_t payload in, one prod_t payload out.
// Timing: one register stage.  Reset clears the payload.
//
// That exponent addition is its own plane follows the architecture; the widths
// are this design's own.
module exp_add_plane
  import fp3d_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  mul_t  in,
  output prod_t out
);

  prod_t nxt;

  always_comb begin
    nxt.tag  = in.tag;
    nxt.zero = in.zero;
    nxt.sign = in.sign;
    nxt.exp  = $signed({3'b000, in.ea}) + $signed({3'b000, in.eb}) - $signed(XE_W'(BIAS));
    nxt.mant = in.mant;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out <= '0;
    else        out <= nxt;
  end

endmodule
