// cpa_tb: carry-propagate adder with sign-magnitude output, random and
// boundary operands, carry-in 0 and 1.
module cpa_tb;
  localparam int W = 70;
  logic [W-1:0] x, y;
  logic         cin, neg, zero;
  logic [W-2:0] mag;
  int checks = 0, failures = 0;

  cpa #(.W(W)) dut (.x(x), .y(y), .cin(cin), .mag_o(mag), .neg_o(neg), .zero_o(zero));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3000; i++) begin
      logic signed [W-1:0] s;
      logic [W-1:0] m;
      x = {$urandom, $urandom, $urandom}; cin = 1'($urandom);
      y = (i % 3 == 0) ? ~x : {$urandom, $urandom, $urandom};
      x[W-1] = x[W-2]; y[W-1] = y[W-2];      // keep |sum| below 2**(W-1)
      #1;
      s = $signed(x) + $signed(y) + W'(cin);
      m = (s < 0) ? W'(-s) : W'(s);
      checks++;
      if (mag != m[W-2:0] || neg != (s < 0) || zero != (s == 0)) begin
        failures++;
        if (failures < 5) $display("x=%h y=%h cin=%b mag=%h exp %h", x, y, cin, mag, m);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
