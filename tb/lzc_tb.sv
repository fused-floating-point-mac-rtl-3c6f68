// lzc_tb: leading-zero counter on single ones, random values and zero.
module lzc_tb;
  localparam int W = 37;
  logic [W-1:0] x;
  logic [5:0]   cnt;
  int checks = 0, failures = 0;

  lzc #(.W(W), .CNT_W(6)) dut (.x(x), .cnt(cnt));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 1000; i++) begin
      int e;
      x = (i == 0) ? '0 : (i < W + 1) ? (W'(1) << (i - 1)) : W'({$urandom, $urandom} >> ($urandom % 40));
      #1;
      e = W;
      for (int k = 0; k < W; k++) if (x[k]) e = W - 1 - k;
      checks++;
      if (int'(cnt) != e) begin
        failures++;
        $display("x=%b cnt=%0d exp %0d", x, cnt, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
