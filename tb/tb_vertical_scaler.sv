// tb_vertical_scaler: scales a series of small synthetic frames vertically
// (2.5x up, 8/3 up, 2/3 down, 3/7 down, a one-line frame, 1:1) and compares
// every output pixel, end-of-line, end-of-frame and filter flag with the
// reference model. Column by column, vertical scaling is the same process as
// the horizontal one, so the reference applies the line model to each column.
// Some frames run with random input gaps and output back-pressure, the others
// free running, where each output line must take exactly W clocks. Counts up
// and down scaling, both filters, input and output stalls and frame-to-frame
// ratio changes, and fails if one never happens.
module tb_vertical_scaler;
  import scaler_pkg::*;
  import scaler_ref_pkg::*;

  localparam int MAX_W = 64;
  localparam int MAX_H = 64;
  localparam int YW = $clog2(MAX_H);
  localparam int DIL = 2;

  logic clk = 0, rst_n = 0;
  logic [SCALE_W-1:0] cfg_l = 1, cfg_m = 1;
  logic [YW:0] cfg_h = 1;
  pix_t cfg_thresh = 24;
  logic in_valid = 0, in_last = 0, in_ready;
  pix_t in_pix = '0;
  logic out_valid, out_ready = 1, out_last, out_eof;
  pix_t out_pix;
  filt_sel_e out_filt;

  vertical_scaler #(.MAX_W(MAX_W), .MAX_H(MAX_H)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle++;

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int exp_pix[$], exp_last[$], exp_eof[$], exp_filt[$];
  int n_filt_a = 0, n_filt_b = 0, n_in_stall = 0, n_out_stall = 0;
  int n_up = 0, n_down = 0, n_switch = 0;
  bit free_run = 1;
  longint line_first;
  int line_cnt = 0;

  always @(negedge clk) begin
    #2;
    if (rst_n) begin
      if (in_valid && !in_ready) n_in_stall++;
      if (out_valid && !out_ready) n_out_stall++;
      if (out_valid && out_ready) begin
        checks++;
        if (exp_pix.size() == 0) begin
          failures++;
          $display("unexpected output pixel %0d", out_pix);
        end else begin
          int p, l, e, f;
          p = exp_pix.pop_front(); l = exp_last.pop_front();
          e = exp_eof.pop_front(); f = exp_filt.pop_front();
          if (int'(out_pix) != p || int'(out_last) != l || int'(out_eof) != e || int'(out_filt) != f) begin
            failures++;
            if (failures < 10)
              $display("cycle %0d: got %0d/%0b/%0b/%0d exp %0d/%0d/%0d/%0d", cycle,
                       out_pix, out_last, out_eof, out_filt, p, l, e, f);
          end
          if (out_filt == FILT_A_SMOOTH) n_filt_a++; else n_filt_b++;
        end
        if (line_cnt == 0) line_first = cycle;
        line_cnt++;
        if (out_last) begin
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

  always @(negedge clk) out_ready = free_run ? 1'b1 : ($urandom % 3 != 0);

  // Picture: rectangles of random level on a random background, plus noise.
  int pic [MAX_H][MAX_W];

  task automatic make_frame(int h, int w);
    int bg, lv, y0, y1, x0, x1;
    bg = $urandom % 256;
    for (int y = 0; y < h; y++) for (int x = 0; x < w; x++) pic[y][x] = bg;
    repeat (3) begin
      lv = $urandom % 256;
      y0 = $urandom % h; y1 = y0 + $urandom % 8;
      x0 = $urandom % w; x1 = x0 + $urandom % 8;
      for (int y = y0; y <= y1 && y < h; y++)
        for (int x = x0; x <= x1 && x < w; x++) pic[y][x] = lv;
    end
    for (int y = 0; y < h; y++)
      for (int x = 0; x < w; x++) pic[y][x] = clampi(pic[y][x] + int'($urandom % 3) - 1, 0, 255);
  endtask

  task automatic expect_frame(int h, int w, int l, int m, int thr);
    int col[$], y[$], f[$], kk[$];
    int outc [MAX_W][$];
    int outf [MAX_W][$];
    int ho;
    for (int x = 0; x < w; x++) begin
      col = {};
      for (int yy = 0; yy < h; yy++) col.push_back(pic[yy][x]);
      ref_line(col, l, m, thr, DIL, y, f, kk);
      outc[x] = y; outf[x] = f;
    end
    ho = outc[0].size();
    for (int yy = 0; yy < ho; yy++)
      for (int x = 0; x < w; x++) begin
        exp_pix.push_back(outc[x][yy]);
        exp_filt.push_back(outf[x][yy]);
        exp_last.push_back(x == w - 1);
        exp_eof.push_back(x == w - 1 && yy == ho - 1);
      end
  endtask

  task automatic send_frame(int h, int w, bit gaps);
    for (int y = 0; y < h; y++)
      for (int x = 0; x < w; x++) begin
        while (gaps && $urandom % 4 == 0) begin
          in_valid = 0;
          @(negedge clk);
        end
        in_valid = 1;
        in_pix   = pix_t'(pic[y][x]);
        in_last  = (x == w - 1);
        #1;
        while (!in_ready) begin
          @(negedge clk);
          #1;
        end
        @(negedge clk);
      end
    in_valid = 0;
    in_last  = 0;
  endtask

  task automatic wait_drain();
    int guard;
    guard = 0;
    while (exp_pix.size() != 0 && guard < 100000) begin @(negedge clk); guard++; end
    repeat (3) @(negedge clk);
  endtask

  task automatic frame(int l, int m, int h, int w, int thr, bit stress);
    wait_drain();
    if (cfg_l != SCALE_W'(l) || cfg_m != SCALE_W'(m)) n_switch++;
    // The stage samples the configuration when a frame starts.
    cfg_l = SCALE_W'(l); cfg_m = SCALE_W'(m); cfg_h = (YW+1)'(h); cfg_thresh = pix_t'(thr);
    free_run = !stress;
    make_frame(h, w);
    expect_frame(h, w, l, m, thr);
    if (l > m) n_up++; else if (l < m) n_down++;
    send_frame(h, w, stress);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    frame(5, 2, 12, 16, 24, 0);
    frame(5, 2, 12, 16, 24, 1);
    frame(8, 3, 9, 21, 20, 0);
    frame(2, 3, 30, 13, 20, 1);
    frame(3, 7, 40, 8, 16, 0);
    frame(4, 1, 1, 5, 24, 0);
    frame(1, 1, 10, 64, 30, 1);
    frame(1, 5, 23, 6, 30, 0);
    wait_drain();
    checks++;
    if (exp_pix.size() != 0) begin failures++; $display("%0d output pixels missing", exp_pix.size()); end
    $display("mechanisms: up %0d down %0d filtA %0d filtB %0d in_stall %0d out_stall %0d switch %0d",
             n_up, n_down, n_filt_a, n_filt_b, n_in_stall, n_out_stall, n_switch);
    checks++;
    if (n_up == 0 || n_down == 0 || n_filt_a == 0 || n_filt_b == 0 || n_in_stall == 0 ||
        n_out_stall == 0 || n_switch == 0) begin
      failures++;
      $display("a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
