// lza_tb: leading-zero anticipator. Checks the worked example of positive
// operands 000010110001111000 + 000001000011111010 (sum 000011110101110010,
// leading one in the fifth position), then random signed operand pairs,
// including near-cancelling ones (b close to -a), against the leading-zero
// count of |a + b + cin| below the sign bit: the anticipated count must be
// within one place of it.
module lza_tb;
  localparam int W = 18;
  logic [W-1:0] a, b;
  logic         cin;
  logic [4:0]   cnt;
  int checks = 0, failures = 0;
  int exact = 0;

  lza #(.W(W), .CNT_W(5)) dut (.a(a), .b(b), .cin(cin), .cnt(cnt));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int true_lz(logic [W-1:0] s);
    logic [W-1:0] m;
    m = s[W-1] ? -s : s;
    for (int k = W - 2; k >= 0; k--) if (m[k]) return W - 2 - k;
    return -100;   // zero or -2**(W-1): no leading digit below the sign
  endfunction

  initial begin
    int t, err;
    a = 18'b000010110001111000; b = 18'b000001000011111010; cin = 0;
    #1;
    checks++;
    // sum 000011110101110010: leading one at bit 13, 3 zeros below the sign
    if (!(cnt == 5'd3 || cnt == 5'd2 || cnt == 5'd4)) begin
      failures++;
      $display("example: cnt=%0d", cnt);
    end
    for (int i = 0; i < 20000; i++) begin
      a = W'($urandom); cin = 1'($urandom);
      case ($urandom % 3)
        0: b = W'($urandom);
        1: b = ~a + W'($urandom % 16);
        default: b = -a + W'($urandom % 4) - W'(2);
      endcase
      #1;
      t = true_lz(W'(a + b + W'(cin)));
      if (t < 0) continue;
      err = int'(cnt) - t;
      checks++;
      if (err == 0) exact++;
      if (err < -1 || err > 1) begin
        failures++;
        if (failures < 5) $display("a=%b b=%b cin=%b cnt=%0d true=%0d", a, b, cin, cnt, t);
      end
    end
    $display("exact predictions: %0d", exact);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
