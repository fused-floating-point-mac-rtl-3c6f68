// sticky_calc: sticky (inexact) detection straight from the carry-save form.
//
// The round stage needs to know whether any bit below the truncation point of
// the normalized result is one. That point is only known after normalization,
// so this block supplies, for every k, zlow[k] = "the low k bits of
// x + y + cin are all zero", computed without the carry chain:
// the low k bits are zero exactly when, at every position i < k, the
// half-sum x_i ^ y_i equals the carry that would enter it, and that carry is
// x_{i-1} | y_{i-1} (cin at position 0) as long as the bits below are zero.
// The same bits are zero in the negated sum, so this also holds when the cpa
// negates a negative result. Using this identity is this design's own choice.
//
// Interface: x, y, cin in; zlow (W+1 bits) out, zlow[0] = 1. Combinational.
module sticky_calc #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic         cin,
  output logic [W:0]   zlow
);

  logic [W-1:0] ok;     // position i would produce a 0 given zeros below
  logic [W-1:0] cprev;

  assign cprev = {x[W-2:0] | y[W-2:0], cin};
  assign ok    = ~((x ^ y) ^ cprev);

  assign zlow[0] = 1'b1;
  for (genvar k = 1; k <= W; k++) begin : g_zero
    assign zlow[k] = zlow[k-1] & ok[k-1];
  end

endmodule
