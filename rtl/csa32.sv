// csa32: W-bit 3:2 carry-save adder.
//
// One full adder per bit position adds the three input bits; no carry moves
// between positions, so the delay does not depend on W. The result is left in
// redundant form: x + y + z == sum + carry (mod 2**W). The carry vector is
// already weighted, i.e. shifted one place left with bit 0 zero; the carry out
// of the top position is dropped, so the block works modulo 2**W (the callers
// size W so that this is exact in two's complement). Combinational.
module csa32 #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic [W-1:0] z,
  output logic [W-1:0] sum,
  output logic [W-1:0] carry
);

  logic [W-1:0] cout;

  for (genvar i = 0; i < W; i++) begin : g_bit
    full_adder u_fa (
      .a   (x[i]),
      .b   (y[i]),
      .cin (z[i]),
      .sum (sum[i]),
      .cout(cout[i])
    );
  end

  assign carry = {cout[W-2:0], 1'b0};

endmodule
