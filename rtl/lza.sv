// lza: leading-zero anticipator for the signed sum a + b + cin (W bits, two's
// complement).
//
// Each bit position is classed as T (propagate, a^b), G (generate, a&b) or
// Z (kill, ~a&~b). Position i holds the leading digit when the sum bit there
// differs from the one above it. With c_i the carry into position i:
//   T_i:  s_i ^ s_{i+1} = ~T_{i+1}                (carry passes through)
//   G_i:  s_i ^ s_{i+1} = ~(T_{i+1} ^ c_i)
//   Z_i:  s_i ^ s_{i+1} =   T_{i+1} ^ c_i
// The indicator f_i uses these relations with c_i taken from the position
// below alone: 1 after a G, 0 after a Z or a T. That guess is exact except
// where a carry runs through a string of T's, so the first one of f lies
// within one place of the true leading digit, for positive (leading zeros)
// and negative (leading ones) sums alike. The carry-in is folded in by
// appending one position below bit 0 where both operands equal cin. The count
// of leading zeros of f, taken from bit W-2 (the first bit below the sign),
// anticipates the leading-one position of |a + b + cin| to within +-1 without
// waiting for the carry chain; the normalizer corrects the remainder.
//
// Interface: a, b, cin in; cnt out (0..W-1, W-1 when the sum is 0 or -1).
// Combinational.
module lza #(
  parameter int unsigned W     = 16,
  parameter int unsigned CNT_W = $clog2(W + 1)
) (
  input  logic [W-1:0]     a,
  input  logic [W-1:0]     b,
  input  logic             cin,
  output logic [CNT_W-1:0] cnt
);

  // extended operands: bit 0 is the appended carry-in position;
  // a position that is neither T nor G is a Z
  logic [W:0]   ax, bx, t, g;
  logic [W-1:0] f;          // f[k] is the indicator of extended position k

  assign ax = {a, cin};
  assign bx = {b, cin};
  assign t  = ax ^ bx;
  assign g  = ax & bx;

  always_comb begin
    for (int k = 0; k < W; k++) begin
      logic cg;              // guessed carry into extended position k
      cg   = (k == 0) ? 1'b0 : g[k-1];
      f[k] = t[k] ? ~t[k+1] : (cg ^ t[k+1] ^ g[k]);
    end
  end

  lzc #(.W(W), .CNT_W(CNT_W)) u_lzc (
    .x  (f),
    .cnt(cnt)
  );

endmodule
