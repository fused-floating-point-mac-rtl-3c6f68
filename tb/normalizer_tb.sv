// normalizer_tb: normalization shift with an anticipated count that is off
// by -1, 0 or +1, and with the subnormal limit e_ref - 1. The expected shift
// is min(leading zeros, e_ref - 1).
module normalizer_tb;
  import fma_pkg::*;
  logic [ALIGN_W:0] mag, nrm;
  logic [LZ_W-1:0]  cnt, sh;
  xexp_t            e_ref;
  logic             lead;
  int checks = 0, failures = 0;

  normalizer dut (.mag(mag), .lza_cnt(cnt), .e_ref(e_ref),
                  .norm_o(nrm), .shift_o(sh), .lead_o(lead));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 5000; i++) begin
      int lz, est, es;
      lz = $urandom % (ALIGN_W + 1);
      mag = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      mag = (mag >> (lz + 1)) | ((ALIGN_W+1)'(1) << (ALIGN_W - lz));
      est = lz + int'($urandom % 3) - 1;
      if (est < 0) est = 0;
      cnt = LZ_W'(est);
      e_ref = (i % 3 == 0) ? xexp_t'(1 + $urandom % 200) : xexp_t'(200 + $urandom % 2000);
      #1;
      es = (lz < int'(e_ref) - 1) ? lz : int'(e_ref) - 1;
      checks++;
      if (int'(sh) != es || nrm != (mag << es) || lead != (es == lz)) begin
        failures++;
        if (failures < 5) $display("lz=%0d est=%0d e_ref=%0d sh=%0d", lz, est, e_ref, sh);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
