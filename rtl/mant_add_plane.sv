// mant_add_plane -- plane 4 of a cell stack: mantissa addition.
//
// The fourth atomic operation.  The plane holds the running sum c as a signed
// fixed-point accumulator scaled by emax (see mant_align_plane).  For each
// valid term it shifts the accumulator right by the distance plane 3 asked for
// (arithmetic shift, truncating) and adds the aligned product; on the first
// term of a new c the accumulator is simply loaded with the product.  Between
// terms the accumulator holds its value.
//
// Interface: one align_t payload in, one sum_t payload out whose acc field is
// the accumulator itself.
// Timing: one register stage; a term can be added every cycle.  Reset clears
// the accumulator.
//
// Mantissa addition as a plane follows the architecture; keeping the sum here,
// unnormalized and wide enough for 2**GROW_W terms, is this design's own.
module mant_add_plane
  import fp3d_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  align_t in,
  output sum_t   out
);

  logic signed [ACC_W-1:0] acc_shifted;

  always_comb acc_shifted = out.acc >>> in.acc_shift;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out <= '0;
    end else begin
      out.tag <= in.tag;
      if (in.tag.valid) begin
        out.emax <= in.emax;
        out.acc  <= in.tag.first ? in.addend : acc_shifted + in.addend;
      end
    end
  end

endmodule
