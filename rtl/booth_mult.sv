// booth_mult: N x N unsigned significand multiplier, radix-4 Booth encoded,
// with a tree of 3:2 carry-save adders. The product is left in carry-save form.
//
// Booth encoding reduces the partial products: the multiplier b is read in
// overlapping 3-bit groups (b[2j+1], b[2j], b[2j-1]), each giving a digit in
// {-2,-1,0,+1,+2}, so N = 53 needs 27 partial products instead of 53. A
// negative digit is formed as the one's complement of the shifted multiple,
// and the missing +1 of each is collected in one extra row, so 28 rows enter
// the tree. Rows are sign extended to OUT_W bits. The tree reduces three rows
// to two per csa32 at each level (28-20-14-10-7-5-4-3-2) until only the sum and
// carry vectors remain; they are not added here, as the fused datapath adds
// them together with the aligned addend.
//
// Interface: a, b (N-bit unsigned) in; sum_o + carry_o == a*b (mod 2**OUT_W).
// With OUT_W >= 2N the true product is recovered by a modulo-2**OUT_W add.
// Combinational. The Booth radix (4) and the tree shape are this design's own
// choices; Booth encoding and carry-save reduction follow the description.
module booth_mult #(
  parameter int unsigned N     = 53,
  parameter int unsigned OUT_W = 2 * N
) (
  input  logic [N-1:0]     a,
  input  logic [N-1:0]     b,
  output logic [OUT_W-1:0] sum_o,
  output logic [OUT_W-1:0] carry_o
);

  localparam int unsigned NPP   = N / 2 + 1;  // Booth digits for unsigned b
  localparam int unsigned NROWS = NPP + 1;    // plus the row of +1 corrections

  function automatic int unsigned rows_at(int unsigned lvl);
    int unsigned n = NROWS;
    for (int unsigned i = 0; i < lvl; i++) n = 2 * (n / 3) + n % 3;
    return n;
  endfunction

  function automatic int unsigned num_levels();
    int unsigned n = NROWS;
    int unsigned l = 0;
    while (n > 2) begin
      n = 2 * (n / 3) + n % 3;
      l++;
    end
    return l;
  endfunction

  localparam int unsigned LEVELS = num_levels();

  typedef enum logic [2:0] {D_ZERO, D_P1, D_P2, D_M1, D_M2} booth_digit_e;

  logic [2*NPP:0]   bx;                      // b with a 0 below and zeros above
  booth_digit_e     digit [NPP];
  logic [OUT_W-1:0] pp    [NROWS];

  assign bx = {{(2*NPP-N){1'b0}}, b, 1'b0};

  // Booth encoder and partial-product generator
  always_comb begin
    logic [N+1:0]     mult;
    logic [OUT_W-1:0] row;
    logic [OUT_W-1:0] corr;
    corr = '0;
    for (int unsigned j = 0; j < NPP; j++) begin
      unique case (bx[2*j +: 3])
        3'b001, 3'b010: digit[j] = D_P1;
        3'b011:         digit[j] = D_P2;
        3'b100:         digit[j] = D_M2;
        3'b101, 3'b110: digit[j] = D_M1;
        default:        digit[j] = D_ZERO;
      endcase
      unique case (digit[j])
        D_P1, D_M1: mult = {2'b00, a};
        D_P2, D_M2: mult = {1'b0, a, 1'b0};
        default:    mult = '0;
      endcase
      row = OUT_W'(mult);
      if (digit[j] == D_M1 || digit[j] == D_M2) begin
        row = ~row;                           // one's complement, sign extended
        corr[2*j] = 1'b1;                     // the +1 that completes negation
      end
      pp[j] = row << (2 * j);
    end
    pp[NPP] = corr;
  end

  // carry-save reduction tree, one generate block per level
  for (genvar l = 0; l < LEVELS; l++) begin : g_lvl
    localparam int unsigned NIN  = rows_at(l);
    localparam int unsigned NOUT = rows_at(l + 1);
    localparam int unsigned G    = NIN / 3;
    logic [OUT_W-1:0] rin  [NIN];
    logic [OUT_W-1:0] rout [NOUT];
    if (l == 0) begin : g_first
      assign rin = pp;
    end else begin : g_next
      assign rin = g_lvl[l-1].rout;
    end
    for (genvar g = 0; g < G; g++) begin : g_csa
      csa32 #(.W(OUT_W)) u_csa (
        .x    (rin[3*g]),
        .y    (rin[3*g+1]),
        .z    (rin[3*g+2]),
        .sum  (rout[2*g]),
        .carry(rout[2*g+1])
      );
    end
    for (genvar r = 0; r < NIN % 3; r++) begin : g_pass
      assign rout[2*G+r] = rin[3*G+r];
    end
  end

  assign sum_o   = g_lvl[LEVELS-1].rout[0];
  assign carry_o = g_lvl[LEVELS-1].rout[1];

endmodule
