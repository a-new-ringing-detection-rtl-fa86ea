// tb_horizontal_scaler: end-to-end test of the scaler at its default
// sizes (1920-pixel lines). A sequence of "frames" of synthetic picture lines
// (flat plateaus separated by sharp steps, ramps and mild noise) is scaled,
// each frame with its own L/M ratio and edge threshold:
//   2.5x up on 256-pixel lines, 720 -> 1920, 1920 -> 1280, 3/7 down,
//   a one-pixel line, and a 1925-pixel input that the scaler must close at
//   1920 pixels.
// Every output pixel, its end-of-line flag and the filter it used are
// compared with the reference model, and the end-of-frame flag given with
// the last line of each frame must come out on that line's last pixel. Frames alternate between a free-running
// output (where each output line must come out at one pixel per clock) and
// random output back-pressure with random input gaps. The test counts how
// often each mechanism occurs and fails if one never does: up scaling, down
// scaling, filter A, filter B, input stall, output stall, ratio change,
// forced line close at MAX_W.
module tb_horizontal_scaler;
  import scaler_pkg::*;
  import scaler_ref_pkg::*;

  localparam int MAX_W = 1920;
  localparam int DIL = 2;

  logic clk = 0, rst_n = 0;
  logic [SCALE_W-1:0] cfg_l = 1, cfg_m = 1;
  pix_t cfg_thresh = 24;
  logic in_valid = 0, in_last = 0, in_eof = 0, in_ready;
  pix_t in_pix = '0;
  logic out_valid, out_ready = 1, out_last, out_eof;
  pix_t out_pix;
  filt_sel_e out_filt;

  horizontal_scaler dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle++;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected output stream.
  int exp_pix[$], exp_last[$], exp_filt[$], exp_eof[$];
  int n_filt_a = 0, n_filt_b = 0, n_in_stall = 0, n_out_stall = 0;
  int n_up = 0, n_down = 0, n_switch = 0, n_trunc = 0;
  bit free_run = 1;
  longint line_first = -1;
  int line_cnt = 0;

  // Sampled 2 ns after the falling edge: what the next rising edge transfers.
  always @(negedge clk) begin
    #2;
    if (!rst_n) begin end
    else begin
    if (in_valid && !in_ready) n_in_stall++;
    if (out_valid && !out_ready) n_out_stall++;
    if (out_valid && out_ready) begin
      checks++;
      if (exp_pix.size() == 0) begin
        failures++;
        $display("unexpected output pixel %0d", out_pix);
      end else begin
        int p, l, f, e;
        p = exp_pix.pop_front(); l = exp_last.pop_front(); f = exp_filt.pop_front();
        e = exp_eof.pop_front();
        if (int'(out_pix) != p || int'(out_last) != l || int'(out_filt) != f || int'(out_eof) != e) begin
          failures++;
          if (failures < 10)
            $display("cycle %0d: got pix %0d last %0b filt %0d, exp %0d %0d %0d",
                     cycle, out_pix, out_last, out_filt, p, l, f);
        end
        if (out_filt == FILT_A_SMOOTH) n_filt_a++; else n_filt_b++;
      end
      if (line_cnt == 0) line_first = cycle;
      line_cnt++;
      if (out_last) begin
        // One output pixel per clock while the output is never held.
        if (free_run) begin
          checks++;
          if (cycle - line_first != line_cnt - 1) begin
            failures++;
            $display("rate: %0d pixels took %0d cycles", line_cnt, cycle - line_first + 1);
          end
        end
        line_cnt = 0;
      end
    end
    end
  end

  // Random output back-pressure when not free running.
  always @(negedge clk) out_ready = free_run ? 1'b1 : ($urandom % 4 != 0);

  function automatic void make_line(int w, output int x[$]);
    int v, seg, slope;
    x = {};
    v = $urandom % 256; seg = 0; slope = 0;
    for (int i = 0; i < w; i++) begin
      if (seg == 0) begin
        seg = 4 + $urandom % 40;
        v = $urandom % 256;
        slope = ($urandom % 4 == 0) ? int'($urandom % 7) - 3 : 0;
      end
      seg--;
      v = clampi(v + slope, 0, 255);
      x.push_back(clampi(v + int'($urandom % 3) - 1, 0, 255));
    end
  endfunction

  // Driven just after the falling edge; in_ready only depends on registers,
  // so its value then is the one the next rising edge sees.
  task automatic send_pixels(int x[$], bit gaps, bit eof = 0);
    for (int i = 0; i < x.size(); i++) begin
      while (gaps && $urandom % 5 == 0) begin
        in_valid = 0;
        @(negedge clk);
      end
      in_valid = 1;
      in_pix   = pix_t'(x[i]);
      in_last  = (i == x.size() - 1);
      in_eof   = eof && (i == x.size() - 1);
      #1;
      while (!in_ready) begin
        @(negedge clk);
        #1;
      end
      @(negedge clk);
    end
    in_valid = 0;
    in_last  = 0;
    in_eof   = 0;
  endtask

  task automatic expect_line(int x[$], int l, int m, int thr, bit eof = 0);
    int y[$], f[$], kk[$];
    ref_line(x, l, m, thr, DIL, y, f, kk);
    foreach (y[i]) begin
      exp_pix.push_back(y[i]);
      exp_last.push_back(i == y.size() - 1);
      exp_filt.push_back(f[i]);
      exp_eof.push_back(eof && i == y.size() - 1);
    end
  endtask

  task automatic wait_drain();
    int guard;
    guard = 0;
    while (exp_pix.size() != 0 && guard < 100000) begin @(negedge clk); guard++; end
    repeat (5) @(negedge clk);
  endtask

  task automatic frame(int l, int m, int thr, int w, int nlines, bit stress);
    int x[$];
    wait_drain();
    if (cfg_l != SCALE_W'(l) || cfg_m != SCALE_W'(m)) n_switch++;
    cfg_l = SCALE_W'(l); cfg_m = SCALE_W'(m); cfg_thresh = pix_t'(thr);
    free_run = !stress;
    for (int n = 0; n < nlines; n++) begin
      make_line(w, x);
      expect_line(x, l, m, thr, n == nlines - 1);
      if (l > m) n_up++; else if (l < m) n_down++;
      send_pixels(x, stress, n == nlines - 1);
    end
  endtask

  initial begin
    int x[$], a[$], b[$];
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    frame(5, 2, 24, 256, 3, 0);    // 2.5x up, free-running output
    frame(5, 2, 24, 256, 2, 1);    // 2.5x up under back-pressure
    frame(8, 3, 32, 720, 2, 0);    // 720 -> 1920
    frame(2, 3, 20, 1920, 2, 0);   // 1920 -> 1280
    frame(2, 3, 20, 1920, 1, 1);
    frame(3, 7, 16, 100, 3, 1);
    frame(4, 1, 24, 1, 1, 0);      // one-pixel line
    // A 1925-pixel input is closed at 1920 pixels; the rest is a new line.
    wait_drain();
    cfg_l = 3; cfg_m = 2; n_switch++;
    free_run = 1;
    make_line(MAX_W + 5, x);
    a = x[0:MAX_W-1];
    b = x[MAX_W:MAX_W+4];
    expect_line(a, 3, 2, 24);
    expect_line(b, 3, 2, 24);
    n_up += 2;
    send_pixels(x, 0);
    wait_drain();
    n_trunc = (exp_pix.size() == 0) ? 1 : 0;
    checks++;
    if (exp_pix.size() != 0) begin failures++; $display("%0d output pixels missing", exp_pix.size()); end
    $display("mechanisms: up %0d down %0d filtA %0d filtB %0d in_stall %0d out_stall %0d switch %0d close_at_max %0d",
             n_up, n_down, n_filt_a, n_filt_b, n_in_stall, n_out_stall, n_switch, n_trunc);
    checks++;
    if (n_up == 0 || n_down == 0 || n_filt_a == 0 || n_filt_b == 0 || n_in_stall == 0 ||
        n_out_stall == 0 || n_switch == 0 || n_trunc == 0) begin
      failures++;
      $display("a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
