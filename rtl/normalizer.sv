// normalizer: left shift that brings the leading one of the adder magnitude to
// the top of the 3p+2-bit field.
//
// The shift is split in two, as with any leading-zero anticipator: a coarse
// shift by the LZA count less one, then a fine shift of 0..3 places chosen from
// the top bits of the coarsely shifted value. The LZA count is within one
// place of the true leading-zero count either way, so starting one place
// short leaves a fine shift of 0..2; the window is one place wider than that. Both steps are limited by e_ref - 1, the largest shift that
// keeps the exponent at or above the minimum normal exponent: a result that
// would need more is left subnormal with its top bit 0.
//
// Interface: mag (ALIGN_W+1 bits, field plus sticky position), lza_cnt, e_ref in;
// norm_o (the shifted value), shift_o (total shift), lead_o (top bit of
// norm_o, 1 for a normal result) out. Combinational.
module normalizer
  import fma_pkg::*;
(
  input  logic [ALIGN_W:0]  mag,
  input  logic [LZ_W-1:0]   lza_cnt,
  input  xexp_t             e_ref,
  output logic [ALIGN_W:0]  norm_o,
  output logic [LZ_W-1:0]   shift_o,
  output logic              lead_o
);

  localparam int unsigned FINE = 3;   // largest fine correction

  logic [ALIGN_W:0] s1;
  logic [LZ_W-1:0]  limit, coarse, fine;

  always_comb begin
    // e_ref >= 1 always; shifts larger than the field are never useful
    if (e_ref - xexp_t'(1) > xexp_t'(ALIGN_W + 1)) limit = LZ_W'(ALIGN_W + 1);
    else                                          limit = LZ_W'(e_ref - xexp_t'(1));

    coarse = (lza_cnt == '0) ? '0 : lza_cnt - LZ_W'(1);
    if (coarse > limit) coarse = limit;
    s1 = mag << coarse;

    fine = LZ_W'(FINE);
    for (int k = FINE; k >= 0; k--) begin
      if (s1[ALIGN_W - k]) fine = LZ_W'(k);
    end
    if (coarse + fine > limit) fine = limit - coarse;

    norm_o  = s1 << fine;
    shift_o = coarse + fine;
    lead_o  = norm_o[ALIGN_W];
  end

  // the coarse shift may never push a one out of the field
  always_comb begin
    if (mag != '0) begin
      assert ((s1 >> coarse) == mag)
        else $error("normalizer: LZA count %0d overshoots", lza_cnt);
    end
  end

endmodule
