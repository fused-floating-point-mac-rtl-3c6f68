// full_adder: one-bit full adder, the cell of the carry-save adder.
//
// Built as described for the adder: two half adders give the sum, and an OR
// of their carries gives the carry out. Inputs a, b and cin; outputs sum and
// cout. Combinational.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);

  logic s1, c1, c2;

  // first half adder
  assign s1   = a ^ b;
  assign c1   = a & b;
  // second half adder
  assign sum  = s1 ^ cin;
  assign c2   = s1 & cin;
  // carries combined
  assign cout = c1 | c2;

endmodule
