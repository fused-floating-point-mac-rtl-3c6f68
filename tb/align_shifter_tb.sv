// align_shifter_tb: right shift of the addend significand into the 161-bit
// field with a sticky bit, plain and complemented, for every shift 0..161,
// with normalized and subnormal (leading-zero) significands.
module align_shifter_tb;
  import fma_pkg::*;
  logic [MANT_W-1:0] m;
  logic [SH_W-1:0]   d;
  logic              neg, st;
  logic [ALIGN_W:0]  o;
  int checks = 0, failures = 0;

  align_shifter dut (.mant(m), .d(d), .negate(neg), .aligned_o(o), .sticky_o(st));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3000; i++) begin
      logic [ALIGN_W-1:0] fld;
      logic               es;
      m = {$urandom, $urandom}; m[MANT_W-1] = 1'b1;
      if (i % 5 == 0) m[30:0] = '0;
      if (i % 2 == 1) m = m >> ($urandom % MANT_W);   // subnormal addends
      d = SH_W'(i % (ALIGN_W + 1)); neg = 1'($urandom);
      #1;
      // bit j of the significand lands at field position 108 + j - d
      fld = '0; es = 1'b0;
      for (int j = 0; j < MANT_W; j++) begin
        int pos;
        pos = 108 + j - int'(d);
        if (pos >= 0) fld[pos] = m[j];
        else if (m[j]) es = 1'b1;
      end
      checks++;
      if (o != ({fld, es} ^ {(ALIGN_W+1){neg}}) || st != es) begin
        failures++;
        if (failures < 5) $display("d=%0d neg=%b", d, neg);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
