// fma_pkg: shared format constants and types of the binary64 fused multiply-add.
//
// The unit works on IEEE 754 binary64 operands (1 sign bit, 11 exponent bits,
// 52 stored fraction bits, precision p = 53, bias 1023), the format the design
// is built around. The internal datapath follows the usual FMA layout: the
// addend is first placed p+3 bits above the product and then shifted right,
// so a single right shifter covers every exponent difference. The field that
// holds addend and product is 3p+2 bits wide; the adder adds a sign bit above
// and a sticky bit below it.
package fma_pkg;

  localparam int unsigned EXP_W   = 11;              // exponent field
  localparam int unsigned FRAC_W  = 52;              // stored fraction
  localparam int unsigned MANT_W  = FRAC_W + 1;      // p, with implied bit
  localparam int unsigned BIAS    = 1023;
  localparam int unsigned EXP_MAX = (1 << EXP_W) - 1; // all-ones exponent

  localparam int unsigned ALIGN_W = 3 * MANT_W + 2;  // 161: addend/product field
  localparam int unsigned ADD_W   = ALIGN_W + 2;     // 163: sign + field + sticky
  localparam int unsigned LZ_W    = $clog2(ADD_W + 1);
  localparam int unsigned SH_W    = 8;               // alignment shift, 0..ALIGN_W
  localparam int unsigned XE_W    = EXP_W + 3;       // signed internal exponent

  // distance between the addend LSB and the product MSB before the shift
  localparam int unsigned ALIGN_OFS = MANT_W + 3;    // 56

  typedef logic signed [XE_W-1:0] xexp_t;

  typedef struct packed {
    logic              sign;
    logic [EXP_W-1:0]  exp;
    logic [FRAC_W-1:0] frac;
  } fp64_t;

  // one operand after the unpack stage
  typedef struct packed {
    logic              sign;
    logic [EXP_W-1:0]  exp;    // effective biased exponent: 1 for subnormals
    logic [MANT_W-1:0] mant;   // significand with the implied bit made explicit
    logic              is_zero;
    logic              is_inf;
    logic              is_nan;
    logic              is_snan;
  } fp_unpacked_t;

  typedef struct packed {
    logic invalid;
    logic overflow;
    logic underflow;
    logic inexact;
  } fma_flags_t;

  localparam fp64_t QNAN      = '{sign: 1'b0, exp: EXP_W'(EXP_MAX), frac: {1'b1, {(FRAC_W-1){1'b0}}}};

endpackage
