// lzc: leading-zero counter. cnt is the number of zeros above the most
// significant one of x, or W when x is zero. Written as a priority scan;
// synthesis turns it into a priority encoder. Combinational.
module lzc #(
  parameter int unsigned W   = 16,
  parameter int unsigned CNT_W = $clog2(W + 1)
) (
  input  logic [W-1:0]     x,
  output logic [CNT_W-1:0] cnt
);

  always_comb begin
    cnt = CNT_W'(W);
    for (int i = 0; i < W; i++) begin
      if (x[i]) cnt = CNT_W'(W - 1 - i);
    end
  end

endmodule
