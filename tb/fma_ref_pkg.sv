// fma_ref_pkg: exact reference model of a binary64 fused multiply-add
// rounded toward zero, for the testbenches.
//
// The finite case is computed exactly: both terms are placed in a 4400-bit
// two's-complement integer whose LSB weighs 2**-2200, wide enough for every
// binary64 product and addend. The exact sum is then truncated to 53
// significant bits (or to the subnormal grid), which is round toward zero by
// definition. Special values follow IEEE 754: NaN operands and invalid
// operations give the default quiet NaN 0x7FF8000000000000, the same choice
// as the design; invalid is raised by signalling NaNs, inf*0 and inf-inf.
// The model shares no code with the design.
package fma_ref_pkg;

  localparam int BW  = 4400;
  localparam int OFS = 2200;

  typedef struct packed {
    logic [63:0] res;
    logic        invalid;
    logic        overflow;
    logic        underflow;
    logic        inexact;
  } ref_out_t;

  function automatic logic is_nan64(logic [63:0] x);
    return (x[62:52] == 11'h7ff) && (x[51:0] != 0);
  endfunction
  function automatic logic is_inf64(logic [63:0] x);
    return (x[62:52] == 11'h7ff) && (x[51:0] == 0);
  endfunction
  function automatic logic is_zero64(logic [63:0] x);
    return x[62:0] == 0;
  endfunction

  function automatic ref_out_t fma_ref(logic [63:0] a, logic [63:0] b, logic [63:0] c);
    ref_out_t o;
    logic sa, sp, any_nan, snan, inv;
    logic signed [BW-1:0] acc, term;
    logic [BW-1:0] mag, lowmask;
    int ea, eb, ec, h, e, pos;
    logic [52:0] ma, mb, mc;
    logic [105:0] p;
    o = '0;
    sa = a[63];
    sp = b[63] ^ c[63];
    any_nan = is_nan64(a) | is_nan64(b) | is_nan64(c);
    snan = (is_nan64(a) & ~a[51]) | (is_nan64(b) & ~b[51]) | (is_nan64(c) & ~c[51]);
    inv = (is_inf64(b) & is_zero64(c)) | (is_zero64(b) & is_inf64(c));
    if (!inv && (is_inf64(b) || is_inf64(c)) && is_inf64(a) && (sa != sp)) inv = 1;
    if (any_nan || inv) begin
      o.res = 64'h7ff8_0000_0000_0000;
      o.invalid = snan | (inv & ~any_nan);
      return o;
    end
    if (is_inf64(b) || is_inf64(c)) begin
      o.res = {sp, 11'h7ff, 52'd0};
      return o;
    end
    if (is_inf64(a)) begin
      o.res = {sa, 11'h7ff, 52'd0};
      return o;
    end
    // finite: exact sum
    ea = (a[62:52] == 0) ? 1 : int'(a[62:52]);
    eb = (b[62:52] == 0) ? 1 : int'(b[62:52]);
    ec = (c[62:52] == 0) ? 1 : int'(c[62:52]);
    ma = {a[62:52] != 0, a[51:0]};
    mb = {b[62:52] != 0, b[51:0]};
    mc = {c[62:52] != 0, c[51:0]};
    p  = mb * mc;
    acc  = '0;
    term = BW'(p);
    term = term << (eb + ec - 2150 + OFS);
    acc  = sp ? acc - term : acc + term;
    term = BW'(ma);
    term = term << (ea - 1075 + OFS);
    acc  = sa ? acc - term : acc + term;
    if (acc == 0) begin
      o.res = {(sa == sp) ? sa : 1'b0, 63'd0};
      return o;
    end
    o.res[63] = acc[BW-1];
    mag = acc[BW-1] ? BW'(-acc) : BW'(acc);
    h = 0;
    for (int i = 0; i < BW; i++) if (mag[i]) h = i;
    e = h - OFS + 1023;              // biased exponent of the leading one
    if (e >= 1) begin
      pos = h - 52;                  // weight position of the result LSB
    end else begin
      pos = OFS - 1074;
    end
    lowmask = (BW'(1) << pos) - 1;
    o.inexact = (mag & lowmask) != 0;
    if (e >= 2047) begin
      o.res[62:0] = {11'h7fe, {52{1'b1}}};
      o.overflow = 1;
      o.inexact  = 1;
    end else if (e >= 1) begin
      o.res[62:52] = 11'(e);
      o.res[51:0]  = 52'(mag >> pos);
    end else begin
      o.res[62:52] = 0;
      o.res[51:0]  = 52'(mag >> pos);
      o.underflow  = o.inexact;
    end
    return o;
  endfunction

endpackage
