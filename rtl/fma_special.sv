// fma_special: special operands and the invalid-operation flag.
//
// Decides, from the classes of A, B and C, whether the result is fixed
// independently of the datapath: any NaN operand, an infinity, or an invalid
// operation (infinity times zero, or infinities of opposite sign meeting in
// the addition). Invalid operations and NaN operands return the default quiet
// NaN (0x7FF8000000000000); NaN payloads are not propagated, which is this
// design's choice. A signalling NaN operand raises invalid. An infinite
// product or addend returns that infinity. Zeros and finite values are left to
// the datapath. Combinational.
module fma_special
  import fma_pkg::*;
(
  input  fp_unpacked_t a,   // addend
  input  fp_unpacked_t b,
  input  fp_unpacked_t c,
  output logic         special_o,
  output fp64_t        res_o,
  output logic         invalid_o
);

  logic any_nan, prod_inf, inf_times_zero, inf_minus_inf, sign_p;

  always_comb begin
    sign_p         = b.sign ^ c.sign;
    any_nan        = a.is_nan | b.is_nan | c.is_nan;
    inf_times_zero = (b.is_inf & c.is_zero) | (b.is_zero & c.is_inf);
    prod_inf       = (b.is_inf | c.is_inf) & ~inf_times_zero;
    inf_minus_inf  = prod_inf & a.is_inf & (a.sign != sign_p);

    invalid_o = a.is_snan | b.is_snan | c.is_snan
              | (~any_nan & (inf_times_zero | inf_minus_inf));
    special_o = any_nan | inf_times_zero | prod_inf | a.is_inf;

    if (any_nan | inf_times_zero | inf_minus_inf) begin
      res_o = QNAN;
    end else if (prod_inf) begin
      res_o = '{sign: sign_p, exp: EXP_W'(EXP_MAX), frac: '0};
    end else begin
      res_o = '{sign: a.sign, exp: EXP_W'(EXP_MAX), frac: '0};
    end
  end

endmodule
