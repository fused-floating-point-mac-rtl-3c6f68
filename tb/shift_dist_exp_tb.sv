// shift_dist_exp_tb: alignment distance and intermediate exponent. The
// expected values come from where the addend LSB has to sit relative to the
// product LSB: k = Ea - Eb - Ec + BIAS + (p-1), the unshifted addend LSB sits
// at 2p+2 in the field, so d = 2p+2 - k, clamped to [0, 3p+2], and the top
// field bit then weighs 2**(e_ref - BIAS).
module shift_dist_exp_tb;
  import fma_pkg::*;
  logic [10:0]     ea, eb, ec;
  logic            pz, out;
  logic [SH_W-1:0] d;
  xexp_t           e_ref;
  int checks = 0, failures = 0;

  shift_dist_exp dut (.ea(ea), .eb(eb), .ec(ec), .prod_zero(pz),
                      .d(d), .e_ref(e_ref), .addend_shifted_out(out));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4000; i++) begin
      int k, ed, ee;
      ea = 11'(1 + $urandom % 2046); eb = 11'(1 + $urandom % 2046); ec = 11'(1 + $urandom % 2046);
      if (i % 2 == 0) ea = 11'(int'(eb) + int'(ec) - 1023 + int'($urandom % 300) - 150 > 0 ?
                               (int'(eb) + int'(ec) - 1023 + int'($urandom % 300) - 150) % 2047 : 1);
      if (ea == 0) ea = 1;
      pz = ($urandom % 8 == 0);
      #1;
      k  = int'(ea) - int'(eb) - int'(ec) + 1023 + 52;
      ed = 108 - k;
      if (pz || ed < 0) begin
        ed = 0; ee = int'(ea);
      end else begin
        ee = int'(eb) + int'(ec) - 1023 + 56;
        if (ed > 161) ed = 161;
      end
      checks++;
      if (int'(d) != ed || int'(e_ref) != ee || out != (ed == 161)) begin
        failures++;
        if (failures < 5) $display("ea=%0d eb=%0d ec=%0d pz=%b d=%0d/%0d e=%0d/%0d", ea, eb, ec, pz, d, ed, e_ref, ee);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
