// fma_special_tb: every combination of operand classes (zero, finite,
// infinity, quiet NaN, signalling NaN, both signs) for A, B and C, against
// the IEEE 754 rules for fused multiply-add.
module fma_special_tb;
  import fma_pkg::*;
  fp_unpacked_t a, b, c;
  logic         special, invalid;
  fp64_t        res;
  int checks = 0, failures = 0;

  fma_special dut (.a(a), .b(b), .c(c), .special_o(special), .res_o(res), .invalid_o(invalid));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // class: 0 zero, 1 finite, 2 inf, 3 qnan, 4 snan
  function automatic fp_unpacked_t mk(int cls, logic s);
    fp_unpacked_t u;
    u = '0;
    u.sign = s; u.exp = 11'd1000; u.mant = 53'h10_0000_0000_0001;
    u.is_zero = (cls == 0); u.is_inf = (cls == 2);
    u.is_nan = (cls >= 3); u.is_snan = (cls == 4);
    return u;
  endfunction

  initial begin
    for (int ca = 0; ca < 5; ca++)
    for (int cb = 0; cb < 5; cb++)
    for (int cc = 0; cc < 5; cc++)
    for (int s = 0; s < 8; s++) begin
      logic nan, snan, ixz, pinf, imi, esp, einv;
      logic [63:0] er;
      a = mk(ca, s[0]); b = mk(cb, s[1]); c = mk(cc, s[2]);
      #1;
      nan  = (ca >= 3) || (cb >= 3) || (cc >= 3);
      snan = (ca == 4) || (cb == 4) || (cc == 4);
      ixz  = (cb == 2 && cc == 0) || (cb == 0 && cc == 2);
      pinf = (cb == 2 || cc == 2) && !ixz;
      imi  = pinf && ca == 2 && (s[0] != (s[1] ^ s[2]));
      esp  = nan || ixz || pinf || ca == 2;
      einv = snan || (!nan && (ixz || imi));
      if (nan || ixz || imi) er = 64'h7ff8_0000_0000_0000;
      else if (pinf)         er = {s[1] ^ s[2], 11'h7ff, 52'd0};
      else                   er = {s[0], 11'h7ff, 52'd0};
      checks++;
      if (special != esp || invalid != einv || (esp && res != er)) begin
        failures++;
        if (failures < 5) $display("ca=%0d cb=%0d cc=%0d s=%0d res=%h", ca, cb, cc, s, res);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
