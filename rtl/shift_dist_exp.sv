// shift_dist_exp: the "shift distance / exponent" block of the FMA.
//
// From the effective exponents Ea (addend), Eb and Ec (multiplicands) it
// computes the right-shift distance d of the addend significand and the
// intermediate result exponent max(Ea, Eb+Ec) that the exponent-update stage
// later corrects. In this datapath the addend starts ALIGN_OFS = p+3 places
// above the product, so
//   d     = Eb + Ec - BIAS - Ea + ALIGN_OFS   clamped to [0, ALIGN_W]
//   e_ref = max(Ea, Eb + Ec - BIAS + ALIGN_OFS)
// where e_ref is the biased exponent of the top bit of the 3p+2-bit field; the
// bias and the p+3 offset are what the algorithm's max(Ea, Eb+Ec) becomes with
// biased exponents and this layout. At d = 0 the product lies entirely below
// the addend's guard bits and only acts as a sticky contribution. When the
// product is zero the addend is kept unshifted (d = 0), so that it can never
// be shifted out. Combinational.
module shift_dist_exp
  import fma_pkg::*;
(
  input  logic [EXP_W-1:0] ea,
  input  logic [EXP_W-1:0] eb,
  input  logic [EXP_W-1:0] ec,
  input  logic             prod_zero,
  output logic [SH_W-1:0]  d,
  output xexp_t            e_ref,
  output logic             addend_shifted_out  // d at its upper clamp
);

  xexp_t e_prod, diff;

  always_comb begin
    e_prod = xexp_t'(eb) + xexp_t'(ec) - xexp_t'(BIAS) + xexp_t'(ALIGN_OFS);
    diff   = e_prod - xexp_t'(ea);
    addend_shifted_out = 1'b0;
    if (prod_zero || diff <= 0) begin
      d     = '0;
      e_ref = xexp_t'(ea);
    end else begin
      e_ref = e_prod;
      if (diff >= xexp_t'(ALIGN_W)) begin
        d = SH_W'(ALIGN_W);
        addend_shifted_out = 1'b1;
      end else begin
        d = SH_W'(diff);
      end
    end
  end

endmodule
