// tb_parallel_line_memory: writes a random line into one slot, then reads the
// 4-pixel window of every output position k (base k-1) from that slot while
// the next line is written into the other slot, one write and one window read
// per clock. Each window must arrive one clock after its read, hold the right
// pixels, and replicate the end pixels beyond both ends of the line. Line
// widths that are and are not multiples of the bank count are used.
module tb_parallel_line_memory;
  import scaler_pkg::*;

  localparam int MAX_W = 64;
  localparam int IW = $clog2(MAX_W);

  logic clk = 0, we = 0, re = 0;
  logic wslot = 0, rslot = 0;
  logic [IW-1:0] widx = '0;
  pix_t wdata = '0;
  logic signed [IW+1:0] rbase = '0;
  logic [IW:0] rwidth = '0;
  pix_t rdata [TAPS];
  int checks = 0, failures = 0, nclamp_lo = 0, nclamp_hi = 0;

  parallel_line_memory #(.MAX_W(MAX_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int lines [2][MAX_W];
  int widths [2];

  function automatic int clampi(int v, int lo, int hi);
    return (v < lo) ? lo : (v > hi) ? hi : v;
  endfunction

  initial begin
    int s, n, k, wpos, steps, exp_p;
    bit reading;
    @(negedge clk);
    // First line into slot 0.
    widths[0] = MAX_W;
    for (int i = 0; i < MAX_W; i++) lines[0][i] = $urandom % 256;
    for (int i = 0; i < widths[0]; i++) begin
      we = 1; wslot = 0; widx = IW'(i); wdata = pix_t'(lines[0][i]);
      @(negedge clk);
    end
    we = 0;
    for (int round = 0; round < 30; round++) begin
      s = round % 2;           // slot being read
      n = 1 - s;               // slot being written
      widths[n] = (round % 3 == 0) ? MAX_W : 1 + ($urandom % MAX_W);
      for (int i = 0; i < widths[n]; i++) lines[n][i] = $urandom % 256;
      steps = (widths[s] > widths[n]) ? widths[s] : widths[n];
      k = 0; wpos = 0;
      for (int c = 0; c <= steps; c++) begin
        // previous read's result is visible now
        if (reading) begin
          for (int t = 0; t < TAPS; t++) begin
            exp_p = lines[s][clampi(k - 2 + t, 0, widths[s] - 1)];
            checks++;
            if (int'(rdata[t]) != exp_p) begin
              failures++;
              if (failures < 10) $display("slot %0d k %0d tap %0d: got %0d exp %0d", s, k - 1, t, rdata[t], exp_p);
            end
          end
          if (k - 1 == 0) nclamp_lo++;
          if (k - 1 >= widths[s] - 2) nclamp_hi++;
        end
        reading = (k < widths[s]);
        re = reading; rslot = s[0];
        rbase = (IW+2)'(k - 1); rwidth = (IW+1)'(widths[s]);
        we = (wpos < widths[n]); wslot = n[0]; widx = IW'(wpos); wdata = pix_t'(lines[n][wpos % MAX_W]);
        @(negedge clk);
        if (reading) k++;
        wpos++;
      end
      re = 0; we = 0;
      reading = 0;
      @(negedge clk);
    end
    checks++;
    if (nclamp_lo == 0 || nclamp_hi == 0) begin failures++; $display("end replication not exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
