// align_shifter: right shifter that aligns the addend significand to the product.
//
// The 53-bit significand is placed at the top of a 3p+2 = 161-bit field and
// shifted right by d (0..ALIGN_W). Every bit shifted past the bottom of the
// field is ORed into one sticky bit, which sits one place below the field;
// this is the usual way to get the sticky bit without shifting bit by bit.
// For an effective subtraction the whole result (field and sticky) is
// complemented; the +1 that completes the two's complement enters as the
// carry-in of the final adder.
//
// Interface: mant, d, negate in; aligned_o = {field, sticky} (ALIGN_W+1 bits),
// sticky_o = the sticky bit before complementing. Combinational.
module align_shifter
  import fma_pkg::*;
(
  input  logic [MANT_W-1:0]  mant,
  input  logic [SH_W-1:0]    d,
  input  logic               negate,
  output logic [ALIGN_W:0]   aligned_o,
  output logic               sticky_o
);

  localparam int unsigned WIDE = 2 * ALIGN_W;

  logic [WIDE-1:0] wide;

  always_comb begin
    wide      = {mant, {(WIDE-MANT_W){1'b0}}} >> d;
    sticky_o  = |wide[ALIGN_W-1:0];
    aligned_o = {wide[WIDE-1 -: ALIGN_W], sticky_o} ^ {(ALIGN_W+1){negate}};
  end

endmodule
