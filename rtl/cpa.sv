// cpa: carry-propagate adder of the FMA, with sign-magnitude output.
//
// Adds the sum and carry vectors of the carry-save stage. Every position,
// the least significant one included, is a full_adder cell, chained carry to
// carry: the LSB cell's carry input takes the +1 that completes the two's
// complement of the addend on an effective subtraction, so no separate
// incrementer is needed. The W-bit result is a two's-complement number; when
// it is negative (the subtracted addend is larger than B*C) it is negated, so
// that the normalizer always receives a magnitude, and neg_o tells the result
// sign logic which operand won.
//
// The full-adder chain at every bit follows the description of the unit; the
// ripple structure is the plainest form of it, and a faster carry network can
// replace the chain without changing the interface. The negation is written
// as an operator.
//
// Interface: x, y, cin in; mag_o (W-1 bits), neg_o, zero_o out. Combinational.
module cpa #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic         cin,
  output logic [W-2:0] mag_o,
  output logic         neg_o,
  output logic         zero_o
);

  logic [W-1:0] s, n;
  logic [W:0]   c;      // c[i] is the carry into position i

  assign c[0] = cin;

  for (genvar i = 0; i < W; i++) begin : g_bit
    full_adder u_fa (
      .a   (x[i]),
      .b   (y[i]),
      .cin (c[i]),
      .sum (s[i]),
      .cout(c[i+1])
    );
  end

  always_comb begin
    n      = -s;
    neg_o  = s[W-1];
    mag_o  = neg_o ? n[W-2:0] : s[W-2:0];
    zero_o = (s == '0);
  end

endmodule
