// exp_update_tb: Ew = e_ref - shift for a normalized result, 0 otherwise.
module exp_update_tb;
  import fma_pkg::*;
  xexp_t           e_ref, ew;
  logic [LZ_W-1:0] sh;
  logic            lead;
  int checks = 0, failures = 0;

  exp_update dut (.e_ref(e_ref), .shift(sh), .lead(lead), .ew(ew));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      e_ref = xexp_t'(1 + $urandom % 3200);
      sh = LZ_W'($urandom % 163);
      lead = 1'($urandom);
      #1;
      checks++;
      if (int'(ew) != (lead ? int'(e_ref) - int'(sh) : 0)) begin
        failures++;
        $display("e_ref=%0d sh=%0d lead=%b ew=%0d", e_ref, sh, lead, ew);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
