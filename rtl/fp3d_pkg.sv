// fp3d_pkg -- number format and plane-to-plane payloads of the 3D systolic
// matrix multiplier.
//
// The array multiplies matrices of floating-point numbers.  Every cell stack
// splits the multiply-accumulate c + a*b into five atomic operations, one per
// plane along the Z axis: mantissa multiplication, exponent addition, mantissa
// alignment, mantissa addition and normalization.  This package holds the
// format of the numbers and the struct that travels from each plane to the
// next one, so that all planes agree on field widths.
//
// Number format (this design's choice; the split into five planes is the
// architecture's, the word layout is not given by it): IEEE-754 binary32
// layout, sign / 8-bit biased exponent / 23-bit fraction with a hidden one.
// Simplifications: an exponent field of 0 means zero (subnormals are flushed),
// the all-ones exponent is an ordinary exponent (no Inf/NaN), results are
// truncated toward zero and saturate at the largest finite magnitude.
//
// The running sum c is kept unnormalized inside a stack: a two's-complement
// fixed-point accumulator of ACC_W bits whose binary point sits PROD_W-2 bits
// from the bottom and whose scale is the largest product exponent seen so far
// (emax).  GROW_W guard bits above the product let up to 2**GROW_W products be
// summed without overflow.
package fp3d_pkg;

  // Number of cell planes along Z (atomic operations per molecular operation).
  localparam int unsigned PLANES = 5;

  localparam int unsigned EXP_W  = 8;
  localparam int unsigned FRAC_W = 23;
  localparam int unsigned BIAS   = (1 << (EXP_W - 1)) - 1;
  localparam int unsigned SIG_W  = FRAC_W + 1;          // significand with hidden one
  localparam int unsigned PROD_W = 2 * SIG_W;           // product of two significands, in [1,4)
  localparam int unsigned XE_W   = EXP_W + 3;           // signed internal exponent
  localparam int unsigned GROW_W = 8;                   // headroom for the sum of N products
  localparam int unsigned ACC_W  = PROD_W + GROW_W + 1; // signed running sum
  localparam int unsigned SH_W   = $clog2(ACC_W + 1);   // shift distances, saturated at ACC_W
  localparam int unsigned MAX_TERMS = 1 << GROW_W;      // largest N the accumulator holds

  // Smallest internal exponent: marks a running sum that is still exactly zero.
  localparam logic signed [XE_W-1:0] EXP_NONE = {1'b1, {(XE_W-1){1'b0}}};

  typedef struct packed {
    logic              sign;
    logic [EXP_W-1:0]  exp;
    logic [FRAC_W-1:0] frac;
  } fp_t;

  // Control that travels with the A stream and then down the Z pipeline.
  typedef struct packed {
    logic valid;  // an (a,b) pair is present
    logic first;  // k = 1: start a new c
    logic last;   // k = N: c is complete after this term
  } tag_t;

  // Plane 1 -> plane 2: significand product.
  typedef struct packed {
    tag_t              tag;
    logic              zero;   // one of the operands is zero
    logic              sign;
    logic [EXP_W-1:0]  ea;
    logic [EXP_W-1:0]  eb;
    logic [PROD_W-1:0] mant;   // unsigned, two integer bits
  } mul_t;

  // Plane 2 -> plane 3: product with its own exponent.
  typedef struct packed {
    tag_t                    tag;
    logic                    zero;
    logic                    sign;
    logic signed [XE_W-1:0]  exp;   // biased, may leave the 8-bit range
    logic [PROD_W-1:0]       mant;
  } prod_t;

  // Plane 3 -> plane 4: product aligned to the running exponent.
  typedef struct packed {
    tag_t                    tag;
    logic signed [XE_W-1:0]  emax;       // exponent of the running sum after this term
    logic [SH_W-1:0]         acc_shift;  // right shift of the running sum before the add
    logic signed [ACC_W-1:0] addend;     // signed, aligned product
  } align_t;

  // Plane 4 -> plane 5: running sum.
  typedef struct packed {
    tag_t                    tag;
    logic signed [XE_W-1:0]  emax;
    logic signed [ACC_W-1:0] acc;
  } sum_t;

endpackage
