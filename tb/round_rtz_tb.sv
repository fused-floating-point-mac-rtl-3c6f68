// round_rtz_tb: truncation, inexact detection from the zero flags, overflow
// saturation to the largest finite number and subnormal underflow.
module round_rtz_tb;
  import fma_pkg::*;
  logic             sign;
  xexp_t            ew;
  logic [ALIGN_W:0] nrm;
  logic [LZ_W-1:0]  sh;
  logic [ADD_W:0]   zlow;
  fp64_t            res;
  logic             ovf, unf, inx;
  int checks = 0, failures = 0;

  round_rtz dut (.sign(sign), .ew(ew), .norm(nrm), .shift(sh), .zlow(zlow),
                 .res_o(res), .overflow_o(ovf), .underflow_o(unf), .inexact_o(inx));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3000; i++) begin
      int nz, drop;
      logic [63:0] e;
      logic ei, eo, eu;
      sign = 1'($urandom);
      nrm = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      ew = (i % 4 == 0) ? xexp_t'(2040 + $urandom % 20) : (i % 4 == 1) ? '0 : xexp_t'(1 + $urandom % 2046);
      nrm[ALIGN_W] = (ew != 0);
      sh = LZ_W'($urandom % 163);
      nz = $urandom % 164;                 // low nz bits of the sum are zero
      for (int k = 0; k <= ADD_W; k++) zlow[k] = (k <= nz);
      #1;
      drop = (int'(sh) >= 109) ? 0 : 109 - int'(sh);
      ei = (drop > nz);
      eo = (int'(ew) >= 2047);
      eu = (ew == 0) && ei;
      if (eo) e = {sign, 11'h7fe, {52{1'b1}}};
      else    e = {sign, ew[10:0], nrm[160:109]};
      checks++;
      if (res != e || ovf != eo || unf != eu || inx != (ei | eo)) begin
        failures++;
        if (failures < 5) $display("ew=%0d sh=%0d nz=%0d res=%h exp %h", ew, sh, nz, res, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
