// cell_stack -- one (i,j) position of the 3D systolic array.
//
// In the X-Y plane the stack behaves like a cell of an ordinary 2D array: the
// A word (with its tag) arriving from the X neighbour and the B word arriving
// from the Y neighbour are registered and handed on, one cycle later, to the
// next stack.  No partial result moves in the X-Y plane.  The same two words
// enter the front plane of the stack, and the molecular operation
// c(i,j) = c(i,j) + a(i,k)*b(k,j) runs along the Z axis through five planes:
//
//   plane 1 mant_mul_plane    mantissa multiplication
//   plane 2 exp_add_plane     exponent addition
//   plane 3 mant_align_plane  mantissa alignment
//   plane 4 mant_add_plane    mantissa addition (holds the running sum)
//   plane 5 normalize_plane   result normalization (holds the finished c)
//
// A new (a,b) pair can enter every atomic cycle.  The finished c(i,j) leaves
// the back plane PLANES cycles after the pair marked last entered the front
// plane, with a one-cycle c_valid pulse, and is held until the next c.
//
// Interface: a_in/a_tag_in/b_in from the neighbours (or the array edge),
// a_out/a_tag_out/b_out to the next neighbours, c_valid/c out of the back.
//
// The stack structure and the order of the planes follow the architecture;
// carrying the first/last tag with the A stream is this design's own way of
// telling a stack where one c ends and the next begins.
module cell_stack
  import fp3d_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  fp_t  a_in,
  input  tag_t a_tag_in,
  input  fp_t  b_in,
  output fp_t  a_out,
  output tag_t a_tag_out,
  output fp_t  b_out,
  output logic c_valid,
  output fp_t  c
);

  mul_t   p1;
  prod_t  p2;
  align_t p3;
  sum_t   p4;

  // constant data streams in the X-Y plane
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_out     <= '0;
      a_tag_out <= '0;
      b_out     <= '0;
    end else begin
      a_out     <= a_in;
      a_tag_out <= a_tag_in;
      b_out     <= b_in;
    end
  end

  // varying data stream along Z
  mant_mul_plane   u_plane1 (.clk, .rst_n, .tag_in(a_tag_in), .a(a_in), .b(b_in), .out(p1));
  exp_add_plane    u_plane2 (.clk, .rst_n, .in(p1), .out(p2));
  mant_align_plane u_plane3 (.clk, .rst_n, .in(p2), .out(p3));
  mant_add_plane   u_plane4 (.clk, .rst_n, .in(p3), .out(p4));
  normalize_plane  u_plane5 (.clk, .rst_n, .in(p4), .c_valid, .c);

endmodule
