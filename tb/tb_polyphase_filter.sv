// tb_polyphase_filter: feeds random tap windows and coefficient sets
// (including sets that push the result below 0 and above 255) and compares
// out_pix with an independent rounding/clipping computation one clock later.
// Checks that the output holds while en is low.
module tb_polyphase_filter;
  import scaler_pkg::*;

  logic clk = 0, rst_n = 0, en = 0, in_valid = 0;
  pix_t taps [TAPS];
  coef_t coefs [TAPS];
  logic out_valid;
  pix_t out_pix;
  int checks = 0, failures = 0, nclip_lo = 0, nclip_hi = 0;

  polyphase_filter dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int acc, exp_y;
    pix_t held;
    for (int t = 0; t < TAPS; t++) begin taps[t] = '0; coefs[t] = '0; end
    @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 5000; n++) begin
      en = 1; in_valid = $urandom % 2;
      acc = 0;
      for (int t = 0; t < TAPS; t++) begin
        taps[t]  = pix_t'($urandom);
        coefs[t] = coef_t'(int'($urandom % 1400) - 300);
        acc += int'(taps[t]) * int'(coefs[t]);
      end
      exp_y = int'($floor((real'(acc) / 1024.0) + 0.5));
      if (exp_y < 0) begin exp_y = 0; nclip_lo++; end
      if (exp_y > 255) begin exp_y = 255; nclip_hi++; end
      @(negedge clk);
      checks++;
      if (int'(out_pix) != exp_y || out_valid != in_valid) begin
        failures++;
        if (failures < 10) $display("n%0d: got %0d exp %0d", n, out_pix, exp_y);
      end
      if (n % 7 == 0) begin
        held = out_pix;
        en = 0;
        taps[0] = ~taps[0];
        @(negedge clk);
        checks++;
        if (out_pix != held) begin failures++; $display("output changed with en low"); end
      end
    end
    checks++;
    if (nclip_lo == 0 || nclip_hi == 0) begin failures++; $display("clipping not exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
