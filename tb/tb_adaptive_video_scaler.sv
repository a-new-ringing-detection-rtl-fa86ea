// tb_adaptive_video_scaler: end-to-end test of the two-stage scaler at its
// default sizes (lines up to 1920 pixels, frames up to 1080 lines).
//
// Frames of a synthetic picture (rectangles on a background, a gradient band
// and mild noise) are scaled and every output pixel, end-of-line,
// end-of-frame and horizontal filter flag is compared with the reference:
// the line model applied first to every column (vertical stage) and then to
// every resulting line (horizontal stage). Small frames run with random
// input gaps and output back-pressure; the large frames are the evaluated
// operations: 2.5x up in both directions of 256 x 256 and 512 x 512
// pictures, 720 x 480 to 1920 x 1080, and 1920 x 1080 to 1280 x 720 (the
// largest frame the design takes). In free-running frames every output line must leave at one pixel
// per clock. The test counts how often each mechanism occurs (up and down
// scaling in each direction, both filters in each stage, input stall, output
// stall, a stall between the two stages, ratio change) and fails if one
// never does.
module tb_adaptive_video_scaler;
  import scaler_pkg::*;
  import scaler_ref_pkg::*;

  localparam int MAX_W = 1920;
  localparam int MAX_H = 1080;
  localparam int YW = $clog2(MAX_H);
  localparam int DIL = 2;

  logic clk = 0, rst_n = 0;
  logic [SCALE_W-1:0] cfg_lh = 1, cfg_mh = 1, cfg_lv = 1, cfg_mv = 1;
  logic [YW:0] cfg_h = 1;
  pix_t cfg_thresh = 24;
  logic in_valid = 0, in_last = 0, in_ready;
  pix_t in_pix = '0;
  logic out_valid, out_ready = 1, out_last, out_eof;
  pix_t out_pix;
  filt_sel_e out_filt;

  adaptive_video_scaler dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle++;

  initial begin
    repeat (20000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct packed {
    logic [7:0] pix;
    logic       last;
    logic       eof;
    logic       filt;
  } exp_t;
  exp_t exp_q[$];

  int n_hfilt[2], n_vfilt[2];
  int n_in_stall = 0, n_out_stall = 0, n_mid_stall = 0;
  int n_vup = 0, n_vdown = 0, n_hup = 0, n_hdown = 0, n_switch = 0;
  bit free_run = 1;
  longint line_first;
  int line_cnt = 0;

  always @(negedge clk) begin
    #2;
    if (rst_n) begin
      if (in_valid && !in_ready) n_in_stall++;
      if (out_valid && !out_ready) n_out_stall++;
      if (dut.v_valid && !dut.v_ready) n_mid_stall++;
      if (dut.v_valid && dut.v_ready) n_vfilt[dut.u_v.out_filt]++;
      if (out_valid && out_ready) begin
        checks++;
        if (exp_q.size() == 0) begin
          failures++;
          $display("unexpected output pixel %0d", out_pix);
        end else begin
          exp_t e;
          e = exp_q.pop_front();
          if (out_pix != e.pix || out_last != e.last || out_eof != e.eof || out_filt != e.filt) begin
            failures++;
            if (failures < 10)
              $display("cycle %0d: got %0d/%0b/%0b/%0d exp %0d/%0d/%0d/%0d", cycle,
                       out_pix, out_last, out_eof, out_filt, e.pix, e.last, e.eof, e.filt);
          end
          n_hfilt[out_filt]++;
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

  logic [7:0] pic [MAX_H][MAX_W];
  logic [7:0] vpic [][];

  task automatic make_frame(int h, int w);
    int bg, lv, y0, y1, x0, x1;
    bg = $urandom % 256;
    for (int y = 0; y < h; y++)
      for (int x = 0; x < w; x++) pic[y][x] = 8'(bg);
    // a horizontal gradient band
    y0 = $urandom % h; y1 = y0 + h / 6;
    for (int y = y0; y <= y1 && y < h; y++)
      for (int x = 0; x < w; x++) pic[y][x] = 8'((x * 256) / w);
    repeat (6) begin
      lv = $urandom % 256;
      y0 = $urandom % h; y1 = y0 + 1 + $urandom % (h / 4 + 2);
      x0 = $urandom % w; x1 = x0 + 1 + $urandom % (w / 4 + 2);
      for (int y = y0; y <= y1 && y < h; y++)
        for (int x = x0; x <= x1 && x < w; x++) pic[y][x] = 8'(lv);
    end
    for (int y = 0; y < h; y++)
      for (int x = 0; x < w; x++) pic[y][x] = 8'(clampi(int'(pic[y][x]) + int'($urandom % 3) - 1, 0, 255));
  endtask

  task automatic expect_frame(int h, int w, int lv, int mv, int lh, int mh, int thr);
    int col[$], y[$], f[$], kk[$], row[$];
    int ho, wo;
    exp_t e;
    // vertical stage, column by column
    for (int x = 0; x < w; x++) begin
      col = {};
      for (int yy = 0; yy < h; yy++) col.push_back(int'(pic[yy][x]));
      ref_line(col, lv, mv, thr, DIL, y, f, kk);
      if (x == 0) begin
        ho = y.size();
        vpic = new[ho];
        foreach (vpic[i]) vpic[i] = new[w];
      end
      for (int yy = 0; yy < ho; yy++) vpic[yy][x] = 8'(y[yy]);
    end
    // horizontal stage, line by line
    for (int yy = 0; yy < ho; yy++) begin
      row = {};
      for (int x = 0; x < w; x++) row.push_back(int'(vpic[yy][x]));
      ref_line(row, lh, mh, thr, DIL, y, f, kk);
      wo = y.size();
      for (int x = 0; x < wo; x++) begin
        e.pix  = 8'(y[x]);
        e.last = (x == wo - 1);
        e.eof  = (x == wo - 1) && (yy == ho - 1);
        e.filt = f[x][0];
        exp_q.push_back(e);
      end
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
        in_pix   = pic[y][x];
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
    while (exp_q.size() != 0) @(negedge clk);
    repeat (5) @(negedge clk);
  endtask

  task automatic frame(int lv, int mv, int lh, int mh, int h, int w, int thr, bit stress);
    longint c0;
    wait_drain();
    if (cfg_lv != SCALE_W'(lv) || cfg_mv != SCALE_W'(mv) ||
        cfg_lh != SCALE_W'(lh) || cfg_mh != SCALE_W'(mh)) n_switch++;
    cfg_lv = SCALE_W'(lv); cfg_mv = SCALE_W'(mv);
    cfg_lh = SCALE_W'(lh); cfg_mh = SCALE_W'(mh);
    cfg_h = (YW+1)'(h); cfg_thresh = pix_t'(thr);
    free_run = !stress;
    make_frame(h, w);
    expect_frame(h, w, lv, mv, lh, mh, thr);
    if (lv > mv) n_vup++; else if (lv < mv) n_vdown++;
    if (lh > mh) n_hup++; else if (lh < mh) n_hdown++;
    c0 = cycle;
    send_frame(h, w, stress);
    wait_drain();
    $display("frame %0dx%0d  V %0d/%0d  H %0d/%0d: %0d cycles", w, h, lv, mv, lh, mh, cycle - c0);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    frame(5, 2, 5, 2, 20, 24, 24, 1);
    frame(2, 3, 8, 3, 30, 17, 20, 1);
    frame(8, 3, 1, 4, 9, 40, 20, 1);
    frame(1, 1, 3, 7, 12, 33, 16, 0);
    frame(5, 2, 5, 2, 256, 256, 24, 0);       // 2.5x up both ways
    frame(5, 2, 5, 2, 512, 512, 24, 0);       // 2.5x up both ways, 512 x 512
    frame(9, 4, 8, 3, 480, 720, 24, 0);       // 720x480 -> 1920x1080
    frame(2, 3, 2, 3, 1080, 1920, 24, 0);     // 1920x1080 -> 1280x720
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("%0d output pixels missing", exp_q.size()); end
    $display("mechanisms: vup %0d vdown %0d hup %0d hdown %0d vfiltA %0d vfiltB %0d hfiltA %0d hfiltB %0d",
             n_vup, n_vdown, n_hup, n_hdown, n_vfilt[1], n_vfilt[0], n_hfilt[1], n_hfilt[0]);
    $display("           in_stall %0d out_stall %0d stage_stall %0d switch %0d",
             n_in_stall, n_out_stall, n_mid_stall, n_switch);
    checks++;
    if (n_vup == 0 || n_vdown == 0 || n_hup == 0 || n_hdown == 0 || n_vfilt[0] == 0 ||
        n_vfilt[1] == 0 || n_hfilt[0] == 0 || n_hfilt[1] == 0 || n_in_stall == 0 ||
        n_out_stall == 0 || n_mid_stall == 0 || n_switch == 0) begin
      failures++;
      $display("a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
