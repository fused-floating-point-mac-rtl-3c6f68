// exp_update: exponent update after normalization.
//
// The intermediate exponent e_ref (the biased exponent of the top field bit,
// from the shift-distance block) is reduced by the normalization shift. A
// result whose leading bit did not reach the top is subnormal (or zero) and
// gets the exponent field 0. The result may exceed the largest exponent; the
// round stage saturates it. Combinational.
module exp_update
  import fma_pkg::*;
(
  input  xexp_t           e_ref,
  input  logic [LZ_W-1:0] shift,
  input  logic            lead,
  output xexp_t           ew
);

  assign ew = lead ? (e_ref - xexp_t'(shift)) : '0;

endmodule
