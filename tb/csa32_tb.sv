// csa32_tb: random test of the 3:2 carry-save adder: sum + carry must equal
// x + y + z modulo 2**W, the carry vector's LSB must be 0, and each sum bit
// must be the XOR of its three inputs (no carry moves sideways).
module csa32_tb;
  localparam int W = 40;
  logic [W-1:0] x, y, z, s, c;
  int checks = 0, failures = 0;

  csa32 #(.W(W)) dut (.x(x), .y(y), .z(z), .sum(s), .carry(c));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      x = {$urandom, $urandom}; y = {$urandom, $urandom}; z = {$urandom, $urandom};
      #1;
      checks++;
      if (W'(s + c) != W'(x + y + z) || c[0] != 1'b0 || s != (x ^ y ^ z)) begin
        failures++;
        if (failures < 5) $display("x=%h y=%h z=%h s=%h c=%h", x, y, z, s, c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
