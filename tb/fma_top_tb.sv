// fma_top_tb: end-to-end test of the binary64 fused multiply-add.
//
// Drives one new operation per clock for NUM_OPS operations, mixing random
// bit patterns, operands with nearby exponents (alignment inside the field),
// near-cancelling A = -(B*C) cases, subnormals, huge exponents and special
// values, and compares every result and flag with the exact model of
// fma_ref_pkg; a quarter of the operations use the subtract mode. It checks the one-cycle latency and full throughput
// (out_valid one clock after in_valid). It also counts how often each
// mechanism of the datapath is exercised (effective subtraction, negative
// adder result, addend above the product, addend shifted out, alignment
// sticky, LZA correction, massive cancellation, subnormal result, overflow,
// invalid, infinity, exact zero, inexact result, subtract operation) and counts a failure for one
// that never happened.
module fma_top_tb;
  import fma_pkg::*;
  import fma_ref_pkg::*;

  localparam int NUM_OPS = 300000;
  localparam int NMECH   = 14;

  logic       clk = 0, rst_n = 0;
  logic       in_valid = 0, sub = 0;
  fp64_t      a = '0, b = '0, c = '0;
  logic       out_valid;
  fp64_t      res;
  fma_flags_t flags;

  int checks = 0, failures = 0;
  int mech [NMECH];
  string mech_name [NMECH] = '{"eff_sub", "neg_sum", "addend_above", "addend_out",
    "align_sticky", "lza_fix", "cancel", "subnormal", "overflow", "invalid",
    "infinity", "exact_zero", "inexact", "subtract"};

  fma_top dut (
    .clk_i(clk), .rst_ni(rst_n), .in_valid_i(in_valid), .sub_i(sub),
    .a_i(a), .b_i(b), .c_i(c),
    .out_valid_o(out_valid), .res_o(res), .flags_o(flags)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (NUM_OPS * 2 + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [63:0] rnd64();
    return {$urandom, $urandom};
  endfunction

  function automatic logic [63:0] special_val();
    case ($urandom % 9)
      0: return 64'h0000_0000_0000_0000;
      1: return 64'h8000_0000_0000_0000;
      2: return 64'h7ff0_0000_0000_0000;
      3: return 64'hfff0_0000_0000_0000;
      4: return 64'h7ff8_0000_0000_1234;
      5: return 64'h7ff0_0000_0000_0001;   // signalling NaN
      6: return 64'h0000_0000_0000_0001;   // smallest subnormal
      7: return 64'h7fef_ffff_ffff_ffff;   // largest finite
      default: return rnd64();
    endcase
  endfunction

  function automatic logic [63:0] with_exp(logic [63:0] x, int e);
    x[62:52] = 11'(e);
    return x;
  endfunction

  // one operand triple of a randomly chosen class
  task automatic gen(output logic [63:0] oa, output logic [63:0] ob, output logic [63:0] oc);
    int k, eb, ec, ea;
    ref_out_t r;
    oa = rnd64(); ob = rnd64(); oc = rnd64();
    k = $urandom % 10;
    case (k)
      0: ;                                           // raw random patterns
      1, 2: begin                                    // nearby exponents
        eb = 700 + $urandom % 600; ec = 700 + $urandom % 600;
        ea = eb + ec - 1023 + int'($urandom % 120) - 60;
        if (ea < 1) ea = 1;
        if (ea > 2046) ea = 2046;
        ob = with_exp(ob, eb); oc = with_exp(oc, ec); oa = with_exp(oa, ea);
      end
      3, 4: begin                                    // near cancellation
        eb = 800 + $urandom % 400; ec = 800 + $urandom % 400;
        ob = with_exp(ob, eb); oc = with_exp(oc, ec);
        r = fma_ref(64'h0, ob, oc);
        oa = r.res ^ 64'h8000_0000_0000_0000;
        if ($urandom % 2 == 1) oa[15:0] = 16'($urandom);
        if ($urandom % 4 == 0) oa[51:0] = oa[51:0] ^ (52'h1 << ($urandom % 52));
      end
      5: begin                                       // subnormal range
        ob = with_exp(ob, 400 + $urandom % 300);
        oc = with_exp(oc, 400 + $urandom % 300);
        oa = with_exp(oa, ($urandom % 3 == 0) ? 0 : $urandom % 60);
        if ($urandom % 2 == 1) ob = with_exp(ob, 0);
      end
      6: begin                                       // overflow range
        ob = with_exp(ob, 1500 + $urandom % 547);
        oc = with_exp(oc, 1500 + $urandom % 547);
      end
      7: begin                                       // addend far above or below
        eb = 600 + $urandom % 800; ec = 600 + $urandom % 800;
        ob = with_exp(ob, eb); oc = with_exp(oc, ec);
        ea = eb + ec - 1023 + (($urandom % 2 == 1) ? 50 + int'($urandom % 80) : -(100 + int'($urandom % 100)));
        if (ea < 0) ea = 0;
        if (ea > 2046) ea = 2046;
        oa = with_exp(oa, ea);
      end
      default: begin                                 // special values mixed in
        if ($urandom % 2 == 1) oa = special_val();
        if ($urandom % 2 == 1) ob = special_val();
        if ($urandom % 2 == 1) oc = special_val();
      end
    endcase
  endtask

  // expected results in issue order
  ref_out_t exp_q [$];
  int       issued = 0, received = 0;

  // count internal mechanisms at the moment an operation is issued
  always @(negedge clk) begin
    if (in_valid) begin
      if (!dut.special) begin
        if (dut.eff_sub) mech[0]++;
        if (dut.sum_neg && !dut.sum_zero) mech[1]++;
        if (!dut.prod_zero && dut.d == 0) mech[2]++;
        if (dut.addend_out && dut.ua.mant != 0) mech[3]++;
        if (dut.align_sticky && dut.ua.mant != 0) mech[4]++;
        if (dut.u_norm.fine > 1 && dut.lead) mech[5]++;
        if (dut.nshift > LZ_W'(MANT_W + 3 + 8) && dut.lead) mech[6]++;
      end
    end
  end

  logic in_valid_d = 0;
  always @(posedge clk) in_valid_d <= in_valid;

  always @(posedge clk) begin
    if (rst_n) begin
      if (out_valid) begin
        ref_out_t e;
        received++;
        checks++;
        if (exp_q.size() == 0) begin
          failures++;
          $display("unexpected out_valid");
        end else begin
          e = exp_q.pop_front();
          if (res != e.res || flags != {e.invalid, e.overflow, e.underflow, e.inexact}) begin
            failures++;
            if (failures < 10)
              $display("MISMATCH got %h flags %b exp %h flags %b", res, flags, e.res,
                       {e.invalid, e.overflow, e.underflow, e.inexact});
          end
          if (e.res[62:52] == 0 && e.res[51:0] != 0) mech[7]++;
          if (e.overflow) mech[8]++;
          if (e.invalid) mech[9]++;
          if (e.res[62:0] == {11'h7ff, 52'd0}) mech[10]++;
          if (e.res[62:0] == 0 && !e.inexact) mech[11]++;
          if (e.inexact) mech[12]++;
        end
      end
      // latency: a result appears exactly one clock after its operation
      checks++;
      if (out_valid != in_valid_d) begin
        failures++;
        $display("latency violation: out_valid %b, in_valid one clock earlier %b",
                 out_valid, in_valid_d);
      end
    end
  end

  initial begin
    logic [63:0] ta, tb, tc;
    logic        ts;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int i = 0; i < NUM_OPS; i++) begin
      gen(ta, tb, tc);
      ts = ($urandom % 4 == 0);
      a <= ta; b <= tb; c <= tc; sub <= ts;
      in_valid <= 1;
      // B*C - A is B*C + (-A); a NaN addend gives the default NaN either way
      exp_q.push_back(fma_ref(ts ? ta ^ 64'h8000_0000_0000_0000 : ta, tb, tc));
      if (ts) mech[13]++;
      issued++;
      @(posedge clk);
    end
    in_valid <= 0;
    repeat (3) @(posedge clk);
    checks++;
    if (received != issued) begin
      failures++;
      $display("received %0d of %0d results", received, issued);
    end
    for (int m = 0; m < NMECH; m++) begin
      $display("mechanism %-12s seen %0d times", mech_name[m], mech[m]);
      checks++;
      if (mech[m] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
