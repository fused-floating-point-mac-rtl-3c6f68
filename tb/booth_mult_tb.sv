// booth_mult_tb: the Booth multiplier at its full 53-bit size. The carry-save
// outputs are added here and compared with a*b, for random operands, all-ones
// operands (every Booth digit -1 or +2 patterns) and powers of two. A second
// instance with a wider output checks that the modular result stays exact
// when the vectors are sign-extended to the fused adder's width. A 6-bit
// instance is run on the worked example 101110 x 010011 = 001101101010 and
// then exhaustively.
module booth_mult_tb;
  localparam int N = 53;
  logic [N-1:0]     a, b;
  logic [2*N-1:0]   s, c;
  logic [161:0]     sw, cw;
  int checks = 0, failures = 0;

  booth_mult #(.N(N)) dut (.a(a), .b(b), .sum_o(s), .carry_o(c));
  booth_mult #(.N(N), .OUT_W(162)) dut_w (.a(a), .b(b), .sum_o(sw), .carry_o(cw));

  // 6-bit instance for the worked example 101110 x 010011 = 001101101010
  logic [5:0]  a6, b6;
  logic [11:0] s6, c6;
  booth_mult #(.N(6)) dut6 (.a(a6), .b(b6), .sum_o(s6), .carry_o(c6));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    logic [2*N-1:0] p;
    #1;
    p = {{N{1'b0}}, a} * {{N{1'b0}}, b};
    checks += 2;
    if ((2*N)'(s + c) != p) begin
      failures++;
      if (failures < 5) $display("a=%h b=%h got %h exp %h", a, b, (2*N)'(s + c), p);
    end
    if (162'(sw + cw) != 162'(p)) failures++;
  endtask

  initial begin
    a6 = 6'b101110; b6 = 6'b010011;
    #1;
    checks++;
    if (12'(s6 + c6) != 12'b001101101010) begin
      failures++;
      $display("6-bit example: got %b", 12'(s6 + c6));
    end
    for (int i = 0; i < 4096; i++) begin
      {a6, b6} = 12'(i);
      #1;
      checks++;
      if (12'(s6 + c6) != 12'(a6) * 12'(b6)) failures++;
    end
    a = '1; b = '1; check();
    a = '0; b = '1; check();
    a = {1'b1, {(N-1){1'b0}}}; b = '1; check();
    for (int i = 0; i < N; i++) begin
      a = {$urandom, $urandom}; b = (N)'(1) << i; check();
    end
    for (int i = 0; i < 3000; i++) begin
      a = {$urandom, $urandom}; b = {$urandom, $urandom};
      a[N-1] = 1'b1; b[N-1] = ($urandom % 4 != 0);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
