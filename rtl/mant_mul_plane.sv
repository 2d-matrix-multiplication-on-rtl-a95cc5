// mant_mul_plane -- plane 1 of a cell stack: mantissa multiplication.
//
// The first of the five atomic operations that make up c + a*b.  The cell
// takes the a and b words that are passing it in the X-Y plane, multiplies
// their significands (hidden one restored), forms the sign of the product and
// flags a zero operand.  The two exponents are handed on untouched to plane 2,
// which adds them.
//
// Interface: a, b and the tag of the A stream in; one mul_t payload out.
// Timing: one register stage (one atomic cycle).  Reset clears the payload.
//
// The split of the multiply into a mantissa plane and an exponent plane follows
// the architecture; the number format and the zero flag are this design's own.
module mant_mul_plane
  import fp3d_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  tag_t tag_in,
  input  fp_t  a,
  input  fp_t  b,
  output mul_t out
);

  mul_t nxt;

  always_comb begin
    nxt.tag  = tag_in;
    nxt.zero = (a.exp == '0) || (b.exp == '0);
    nxt.sign = a.sign ^ b.sign;
    nxt.ea   = a.exp;
    nxt.eb   = b.exp;
    nxt.mant = PROD_W'({1'b1, a.frac}) * PROD_W'({1'b1, b.frac});
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out <= '0;
    else        out <= nxt;
  end

endmodule
