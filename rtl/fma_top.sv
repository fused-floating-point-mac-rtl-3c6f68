// fma_top: binary64 fused multiply-add, W = A + B*C, with one rounding step
// (toward zero).
//
// Datapath (combinational, followed by one output register):
//   unpack  - three fp_unpack stages expose sign, exponent and 53-bit significand.
//   exponent path - shift_dist_exp gives the alignment distance d and the
//             intermediate exponent max(Ea, Eb+Ec); exp_update subtracts the
//             normalization shift to give Ew.
//   multiply - booth_mult forms Mb*Mc as a sum and a carry vector.
//   align   - align_shifter shifts Ma right by d (in parallel with the
//             multiplication), collects a sticky bit and complements the
//             addend on an effective subtraction.
//   3:2 CSA - csa32 merges the two product vectors and the aligned addend.
//   then, in parallel on the CSA outputs: cpa (the signed add, giving sign
//             and magnitude), lza (anticipated normalization shift) and
//             sticky_calc (which low bit groups of the sum are zero).
//   normalizer, round_rtz - normalize, truncate, saturate on overflow.
//   fma_special - NaN / infinity / invalid handling, muxed over the result.
// The block structure follows the fused multiply-add organization of the
// description; the field widths (3p+2 = 161 bits), the two-step normalizer,
// the zero-result sign rule and the single output register are this design's
// choices.
//
// Interface: in_valid_i with a_i (addend), b_i, c_i (IEEE binary64 words) and
// sub_i (0: W = B*C + A, 1: W = B*C - A, the subtract case of the signed
// addition, done by flipping the addend sign before the datapath);
// one clock later out_valid_o with res_o and flags_o {invalid, overflow,
// underflow, inexact}. A new operation can be started every cycle.
// rst_ni is an active-low asynchronous reset of the output register.
module fma_top
  import fma_pkg::*;
(
  input  logic       clk_i,
  input  logic       rst_ni,
  input  logic       in_valid_i,
  input  logic       sub_i,       // 1: W = B*C - A
  input  fp64_t      a_i,
  input  fp64_t      b_i,
  input  fp64_t      c_i,
  output logic       out_valid_o,
  output fp64_t      res_o,
  output fma_flags_t flags_o
);

  fp_unpacked_t ua_raw, ua, ub, uc;

  fp_unpack u_unpack_a (.op_i(a_i), .up_o(ua_raw));
  fp_unpack u_unpack_b (.op_i(b_i), .up_o(ub));
  fp_unpack u_unpack_c (.op_i(c_i), .up_o(uc));

  // subtraction of the addend is an addition with its sign flipped
  always_comb begin
    ua      = ua_raw;
    ua.sign = ua_raw.sign ^ sub_i;
  end

  logic sign_p, eff_sub, prod_zero;
  assign sign_p    = ub.sign ^ uc.sign;
  assign eff_sub   = ua.sign ^ sign_p;
  assign prod_zero = (ub.mant == '0) | (uc.mant == '0);

  // exponent path
  logic [SH_W-1:0] d;
  xexp_t           e_ref;
  logic            addend_out;

  shift_dist_exp u_sde (
    .ea(ua.exp), .eb(ub.exp), .ec(uc.exp), .prod_zero(prod_zero),
    .d(d), .e_ref(e_ref), .addend_shifted_out(addend_out)
  );

  // significand multiplier, carry-save output sized to the adder width
  logic [ADD_W-2:0] p_sum, p_carry;

  booth_mult #(.N(MANT_W), .OUT_W(ADD_W - 1)) u_mult (
    .a(ub.mant), .b(uc.mant), .sum_o(p_sum), .carry_o(p_carry)
  );

  // addend alignment
  logic [ALIGN_W:0] a_aligned;
  logic             align_sticky;

  align_shifter u_align (
    .mant(ua.mant), .d(d), .negate(eff_sub),
    .aligned_o(a_aligned), .sticky_o(align_sticky)
  );

  // 3:2 carry-save adder: product vectors (moved above the sticky position)
  // and the aligned addend with its sign extension
  logic [ADD_W-1:0] csa_s, csa_c;

  csa32 #(.W(ADD_W)) u_csa (
    .x    ({p_sum, 1'b0}),
    .y    ({p_carry, 1'b0}),
    .z    ({eff_sub, a_aligned}),
    .sum  (csa_s),
    .carry(csa_c)
  );

  // adder, anticipator and sticky detection in parallel
  logic [ADD_W-2:0] mag;
  logic             sum_neg, sum_zero;
  logic [LZ_W-1:0]  lza_cnt;
  logic [ADD_W:0]   zlow;

  cpa #(.W(ADD_W)) u_cpa (
    .x(csa_s), .y(csa_c), .cin(eff_sub),
    .mag_o(mag), .neg_o(sum_neg), .zero_o(sum_zero)
  );

  lza #(.W(ADD_W), .CNT_W(LZ_W)) u_lza (
    .a(csa_s), .b(csa_c), .cin(eff_sub), .cnt(lza_cnt)
  );

  sticky_calc #(.W(ADD_W)) u_sticky (
    .x(csa_s), .y(csa_c), .cin(eff_sub), .zlow(zlow)
  );

  // normalize, exponent update, round
  logic [ALIGN_W:0] norm;
  logic [LZ_W-1:0]  nshift;
  logic             lead;
  xexp_t            ew;

  normalizer u_norm (
    .mag(mag), .lza_cnt(lza_cnt), .e_ref(e_ref),
    .norm_o(norm), .shift_o(nshift), .lead_o(lead)
  );

  exp_update u_eupd (.e_ref(e_ref), .shift(nshift), .lead(lead), .ew(ew));

  logic       sign_w;
  fp64_t      rnd_res;
  logic       rnd_ovf, rnd_unf, rnd_inx;

  // an exact zero sum is +0 unless both terms are zeros of the same sign
  always_comb begin
    if (sum_zero)     sign_w = eff_sub ? 1'b0 : ua.sign;
    else if (eff_sub) sign_w = sum_neg ? ua.sign : sign_p;
    else              sign_w = ua.sign;
  end

  round_rtz u_round (
    .sign(sign_w), .ew(ew), .norm(norm), .shift(nshift), .zlow(zlow),
    .res_o(rnd_res), .overflow_o(rnd_ovf), .underflow_o(rnd_unf),
    .inexact_o(rnd_inx)
  );

  // special values
  logic  special, invalid;
  fp64_t spec_res;

  fma_special u_special (
    .a(ua), .b(ub), .c(uc),
    .special_o(special), .res_o(spec_res), .invalid_o(invalid)
  );

  fp64_t      res_d;
  fma_flags_t flags_d;

  always_comb begin
    if (special) begin
      res_d   = spec_res;
      flags_d = '{invalid: invalid, overflow: 1'b0, underflow: 1'b0, inexact: 1'b0};
    end else begin
      res_d   = rnd_res;
      flags_d = '{invalid: 1'b0, overflow: rnd_ovf, underflow: rnd_unf, inexact: rnd_inx};
    end
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      out_valid_o <= 1'b0;
      res_o       <= '0;
      flags_o     <= '0;
    end else begin
      out_valid_o <= in_valid_i;
      if (in_valid_i) begin
        res_o   <= res_d;
        flags_o <= flags_d;
      end
    end
  end

endmodule
