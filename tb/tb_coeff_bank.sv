// tb_coeff_bank: reads every (filter, phase) of coeff_bank and compares the
// four coefficients with the floating-point reference kernels. Also checks
// that each phase sums to exactly 1.0, that filter A never goes negative (no
// overshoot) while filter B does, the one-cycle read latency, and that the
// output holds while en is low.
module tb_coeff_bank;
  import scaler_pkg::*;
  import scaler_ref_pkg::*;

  logic clk = 0, en = 0;
  filt_sel_e sel = FILT_B_SHARP;
  logic [PHASE_BITS-1:0] phase = '0;
  coef_t coef [TAPS];
  int checks = 0, failures = 0, neg_b = 0;

  coeff_bank dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int s, exp_c;
    coef_t held [TAPS];
    @(negedge clk);
    for (int f = 0; f < 2; f++) begin
      for (int p = 0; p < 64; p++) begin
        en = 1; sel = filt_sel_e'(f); phase = PHASE_BITS'(p);
        @(negedge clk);
        s = 0;
        for (int t = 0; t < TAPS; t++) begin
          exp_c = ref_coef(f, p, t);
          checks++;
          if (int'(coef[t]) != exp_c) begin
            failures++;
            if (failures < 10) $display("f%0d p%0d t%0d: got %0d exp %0d", f, p, t, coef[t], exp_c);
          end
          s += int'(coef[t]);
          if (f == 1 && coef[t] < 0) begin
            failures++; $display("filter A negative at p%0d t%0d", p, t);
          end
          if (f == 0 && coef[t] < 0) neg_b++;
        end
        checks++;
        if (s != 1024) begin failures++; $display("f%0d p%0d sums to %0d", f, p, s); end
      end
    end
    // Hold while en is low.
    held = coef;
    en = 0; sel = FILT_A_SMOOTH; phase = 7;
    @(negedge clk);
    checks++;
    if (coef != held) begin failures++; $display("output changed with en low"); end
    checks++;
    if (neg_b == 0) begin failures++; $display("filter B has no negative lobe"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
