// fp_unpack: unpack-operands stage of the fused multiply-add.
//
// Splits a binary64 word into sign, exponent and a 53-bit significand whose
// most significant bit is the implied bit. As the unpack stage is described,
// the implied bit is 1 for every operand except those with a zero exponent;
// a zero exponent with a non-zero fraction is a subnormal, whose exponent is
// taken as 1 so that it has the same scale as the smallest normal number.
// The classification flags (zero, infinity, NaN, signalling NaN) feed the
// special-value logic; that split is this design's own choice.
// Purely combinational.
module fp_unpack
  import fma_pkg::*;
(
  input  fp64_t        op_i,
  output fp_unpacked_t up_o
);

  logic exp_zero, exp_ones, frac_zero;

  always_comb begin
    exp_zero  = (op_i.exp == '0);
    exp_ones  = (op_i.exp == EXP_W'(EXP_MAX));
    frac_zero = (op_i.frac == '0);

    up_o.sign    = op_i.sign;
    up_o.exp     = exp_zero ? EXP_W'(1) : op_i.exp;
    up_o.mant    = {~exp_zero, op_i.frac};
    up_o.is_zero = exp_zero & frac_zero;
    up_o.is_inf  = exp_ones & frac_zero;
    up_o.is_nan  = exp_ones & ~frac_zero;
    up_o.is_snan = exp_ones & ~frac_zero & ~op_i.frac[FRAC_W-1];
  end

endmodule
