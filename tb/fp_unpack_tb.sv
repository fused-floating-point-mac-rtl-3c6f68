// fp_unpack_tb: unpack stage on normal, subnormal, zero, infinity and NaN
// operands; expected fields are worked out from the bit pattern here.
module fp_unpack_tb;
  import fma_pkg::*;
  fp64_t        op;
  fp_unpacked_t up;
  int checks = 0, failures = 0;

  fp_unpack dut (.op_i(op), .up_o(up));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [63:0] w);
    logic [10:0] e;
    logic [51:0] f;
    op = w;
    e = w[62:52]; f = w[51:0];
    #1;
    checks++;
    if (up.sign != w[63]
        || up.exp != ((e == 0) ? 11'd1 : e)
        || up.mant != {e != 0, f}
        || up.is_zero != (e == 0 && f == 0)
        || up.is_inf != (e == 11'h7ff && f == 0)
        || up.is_nan != (e == 11'h7ff && f != 0)
        || up.is_snan != (e == 11'h7ff && f != 0 && !f[51])) begin
      failures++;
      $display("op=%h up=%p", w, up);
    end
  endtask

  initial begin
    check(64'h3ff0_0000_0000_0000);   // 1.0
    check(64'hc000_0000_0000_0000);   // -2.0
    check(64'h0000_0000_0000_0001);   // smallest subnormal
    check(64'h8000_0000_0000_0000);   // -0
    check(64'h7ff0_0000_0000_0000);   // +inf
    check(64'h7ff8_0000_0000_0000);   // quiet NaN
    check(64'h7ff0_0000_0000_0001);   // signalling NaN
    for (int i = 0; i < 500; i++) check({$urandom, $urandom});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
