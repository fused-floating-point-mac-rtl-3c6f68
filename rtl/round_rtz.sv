// round_rtz: the round stage, round toward zero (truncation) only.
//
// The unit offers a single rounding mode, toward zero, so rounding is a
// truncation of the normalized value to its top p = 53 bits; nothing is ever
// added, and no carry can ripple back into the exponent. The sticky
// information decides only the inexact flag: the discarded part is the low
// (ALIGN_W+1 - p - shift) bits of the adder result, whose zero flags come
// from the sticky-calculation block. A result exponent at or above the
// all-ones code overflows; toward zero that gives the largest finite number
// of the result's sign. An exponent of 0 encodes a subnormal or zero;
// underflow is signalled when such a result is inexact (tininess before and
// after rounding agree for truncation). Combinational.
module round_rtz
  import fma_pkg::*;
(
  input  logic             sign,
  input  xexp_t            ew,
  input  logic [ALIGN_W:0] norm,
  input  logic [LZ_W-1:0]  shift,
  input  logic [ADD_W:0]   zlow,
  output fp64_t            res_o,
  output logic             overflow_o,
  output logic             underflow_o,
  output logic             inexact_o
);

  localparam int unsigned DROP = ALIGN_W + 1 - MANT_W;   // 109 bits below the LSB

  logic [MANT_W-1:0] mant;
  logic [LZ_W-1:0]   ndrop;
  logic              lost;

  always_comb begin
    mant  = norm[ALIGN_W -: MANT_W];
    ndrop = (shift >= LZ_W'(DROP)) ? '0 : LZ_W'(DROP) - shift;
    lost  = ~zlow[ndrop];

    overflow_o  = (ew >= xexp_t'(EXP_MAX));
    inexact_o   = lost | overflow_o;
    underflow_o = (ew == '0) & lost;
    if (overflow_o) begin
      res_o = '{sign: sign, exp: EXP_W'(EXP_MAX - 1), frac: '1};
    end else begin
      res_o = '{sign: sign, exp: ew[EXP_W-1:0], frac: mant[FRAC_W-1:0]};
    end
  end

endmodule
