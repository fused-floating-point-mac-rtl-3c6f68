// sticky_calc_tb: for random carry-save pairs (with many trailing zeros in
// their sum) checks every zlow[k] against the low k bits of x + y + cin.
module sticky_calc_tb;
  localparam int W = 48;
  logic [W-1:0] x, y;
  logic         cin;
  logic [W:0]   zlow;
  int checks = 0, failures = 0;

  sticky_calc #(.W(W)) dut (.x(x), .y(y), .cin(cin), .zlow(zlow));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3000; i++) begin
      logic [W-1:0] s;
      logic [W:0] e;
      x = {$urandom, $urandom}; cin = 1'($urandom);
      // y = (target with trailing zeros) - x - cin
      s = W'({$urandom, $urandom}) << ($urandom % (W + 1));
      y = (i % 4 == 0) ? W'({$urandom, $urandom}) : s - x - W'(cin);
      #1;
      s = x + y + W'(cin);
      for (int k = 0; k <= W; k++) e[k] = (k == 0) ? 1'b1 : ((s & ((W'(1) << k) - 1)) == 0) && (k < W || s == 0);
      checks++;
      if (zlow != e) begin
        failures++;
        if (failures < 5) $display("x=%h y=%h cin=%b zlow=%b exp %b", x, y, cin, zlow, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
