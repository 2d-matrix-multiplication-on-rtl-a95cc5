// normalize_plane -- plane 5 of a cell stack: result normalization.
//
// The fifth atomic operation.  It turns the running sum (a signed fixed-point
// number scaled by emax, binary point PROD_W-2 bits up) back into a
// floating-point word: take the magnitude, find its leading one, shift it to
// the hidden-one position and adjust the exponent by the distance.  The
// fraction is truncated.  A biased exponent below 1 gives zero (signed), one
// above the largest code saturates to the largest finite magnitude.  The word
// is written to the output, and c_valid pulses, when the term marked last has
// gone through; the word then stays until the next c is complete.
//
// Interface: one sum_t payload in; c_valid and c out (the Z-axis output of the
// stack).
// Timing: one register stage.  Reset clears the output to +0.
//
// Normalization as the last plane follows the architecture; rounding,
// saturation and flushing are this design's own choices.
module normalize_plane
  import fp3d_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  sum_t in,
  output logic c_valid,
  output fp_t  c
);

  localparam int unsigned POS_W = $clog2(ACC_W);

  logic [ACC_W-1:0]       mag;
  logic [POS_W-1:0]       lead;
  logic                   nonzero;
  logic [ACC_W-1:0]       shifted;
  logic signed [XE_W+1:0] e_res;
  fp_t                    res;

  always_comb begin
    mag = in.acc[ACC_W-1] ? ACC_W'(-in.acc) : ACC_W'(in.acc);

    // leading-one detector
    lead    = '0;
    nonzero = 1'b0;
    for (int p = 0; p < ACC_W; p++) begin
      if (mag[p]) begin
        lead    = POS_W'(p);
        nonzero = 1'b1;
      end
    end

    shifted = mag << (POS_W'(ACC_W - 1) - lead);   // leading one now at the top
    e_res   = $signed({{2{in.emax[XE_W-1]}}, in.emax})
            + $signed({{(XE_W + 2 - POS_W){1'b0}}, lead})
            - $signed((XE_W+2)'(PROD_W - 2));

    res.sign = in.acc[ACC_W-1];
    if (!nonzero) begin
      res = '0;
    end else if (e_res < 1) begin
      res.exp  = '0;
      res.frac = '0;
    end else if (e_res > $signed((XE_W+2)'((1 << EXP_W) - 1))) begin
      res.exp  = '1;
      res.frac = '1;
    end else begin
      res.exp  = EXP_W'(e_res);
      res.frac = shifted[ACC_W-2 -: FRAC_W];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c_valid <= 1'b0;
      c       <= '0;
    end else begin
      c_valid <= in.tag.valid && in.tag.last;
      if (in.tag.valid && in.tag.last) c <= res;
    end
  end

endmodule
