// vertical_scaler: rational-factor vertical scaling stage with the same
// ringing-adaptive filter choice as the horizontal stage, applied down the
// columns of the picture.
//
// Input lines are stored whole in NB = 2*DIL+5 line banks (line y in bank
// y mod NB, pixel x at word x). To make output line m the stage needs, for
// every column x, the four input lines k-1 .. k+2 around its vertical position
// (k = floor(m*M/L), from position_dda) for the 4-tap filter, and lines
// k-DIL-1 .. k+DIL+2 to classify the nearest line: vertical edges
// e(y) = |p(y+1) - p(y-1)| > thresh, dilated by +-DIL lines and XORed with
// the edge map, exactly as the horizontal stage does along a line. All NB
// banks are read in parallel at column x, so one output pixel leaves per
// clock, and the ninth bank takes the next input line while the other eight
// are read. Lines beyond the top and bottom of the frame are replaced by the
// first and last line.
//
// Frame handling: cfg_h (input lines per frame), cfg_l and cfg_m are sampled
// when the first pixel of a frame is offered (one clock before it is taken); the width of a frame is that of its first line (all
// lines of a frame must have this width). The stage accepts a line once the
// bank it goes into is no longer needed (in_ready low otherwise) and starts
// output line m once lines up to k+DIL+2 (or the end of the frame) are in.
// After the last output line of a frame it starts the next frame.
//
// Interfaces: valid/ready streams; in_last ends an input line (a line
// reaching MAX_W pixels is closed there). out_last ends an output line,
// out_eof marks the last pixel of the frame, out_filt the filter used.
// Timing: four register stages (bank read, classification and coefficient
// read, filter, output) from column issue to out_valid.
//
// The scaling and classification rules follow the scaler concept; applying
// them along columns with this line store, the per-frame sampling of the
// configuration and all handshakes are this design's choices.
module vertical_scaler
  import scaler_pkg::*;
#(
  parameter int MAX_W = 1920,       // longest line
  parameter int MAX_H = 1080,       // most input lines per frame
  parameter int PB    = PHASE_BITS,
  parameter int DIL   = 2,
  localparam int IW   = $clog2(MAX_W),
  localparam int YW   = $clog2(MAX_H),
  localparam int WIN  = 2 * DIL + 4,  // lines read per output line
  localparam int NB   = WIN + 1,      // line banks
  localparam int BW   = $clog2(NB)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [SCALE_W-1:0] cfg_l,
  input  logic [SCALE_W-1:0] cfg_m,
  input  logic [YW:0]        cfg_h,
  input  pix_t               cfg_thresh,
  input  logic               in_valid,
  output logic               in_ready,
  input  pix_t               in_pix,
  input  logic               in_last,
  output logic               out_valid,
  input  logic               out_ready,
  output pix_t               out_pix,
  output logic               out_last,
  output logic               out_eof,
  output filt_sel_e          out_filt
);

  localparam int P = 1 << PB;

  typedef enum logic {F_START, F_RUN} fstate_e;
  fstate_e fstate;

  // ------------------------------------------------------------ frame / dda
  logic               dda_start, dda_valid, dda_last, adv;
  logic [YW-1:0]      k;
  logic [SCALE_W-1:0] r_unused;
  logic [PB-1:0]      phase;
  logic [YW:0]        fh;

  assign dda_start = (fstate == F_START) && in_valid;

  position_dda #(.MAX_W(MAX_H), .PB(PB)) u_dda (
    .clk  (clk),
    .rst_n(rst_n),
    .start(dda_start),
    .cfg_l(cfg_l),
    .cfg_m(cfg_m),
    .width(cfg_h),
    .adv  (adv),
    .valid(dda_valid),
    .k    (k),
    .r    (r_unused),
    .phase(phase),
    .last (dda_last)
  );

  // ------------------------------------------------------------------ write
  logic [YW:0]   wy;      // complete lines received in this frame
  logic [BW-1:0] wbank;   // wy mod NB
  logic [IW-1:0] wx;
  logic [IW:0]   fw;      // frame width
  logic          accept, eff_last;

  assign in_ready = (fstate == F_RUN) && dda_valid && (wy < fh) &&
                    ({1'b0, wy} <= {2'b00, k} + (YW+2)'(NB - DIL - 2));
  assign accept   = in_valid && in_ready;
  assign eff_last = in_last || (wx == IW'(MAX_W - 1));

  pix_t bank_q [NB];
  logic en, line_active, issue;
  logic [IW-1:0] rx;

  assign en    = !out_valid || out_ready;
  assign issue = en && line_active;

  for (genvar b = 0; b < NB; b++) begin : g_bank
    line_mem_bank #(.DW(PIX_W), .DEPTH(MAX_W)) u_bank (
      .clk  (clk),
      .we   (accept && wbank == BW'(b)),
      .waddr(wx),
      .wdata(in_pix),
      .re   (issue),
      .raddr(rx),
      .rdata(bank_q[b])
    );
  end

  // ------------------------------------------------------------- read issue
  logic can_start, col_last;
  logic [YW+1:0] need;

  always_comb begin
    need = {2'b00, k} + (YW+2)'(DIL + 3);
    if (need > {1'b0, fh}) need = {1'b0, fh};
  end

  assign can_start = (fstate == F_RUN) && dda_valid && !line_active && ({1'b0, wy} >= need);
  assign col_last  = ({1'b0, rx} == fw - 1'b1);
  assign adv       = issue && col_last;

  // Window of lines k-DIL-1 .. k+DIL+2: bank holding each (clamped) line and
  // whether the unclamped line lies inside the frame.
  logic [BW-1:0] bsel [WIN];
  logic [WIN-1:0] inr;
  logic noff;

  always_comb begin
    for (int i = 0; i < WIN; i++) begin
      int y, yc;
      y  = int'(k) - (DIL + 1) + i;
      yc = y;
      if (yc < 0) yc = 0;
      if (yc > int'(fh) - 1) yc = int'(fh) - 1;
      if (yc < 0) yc = 0;
      bsel[i] = BW'(yc % NB);
      inr[i]  = (y >= 0) && (y < int'(fh));
    end
    // nearest input line is k or k+1, never beyond the frame
    noff = (phase >= PB'(P / 2)) && ({1'b0, k} + 1'b1 < fh);
  end

  // -------------------------------------------- stage 1: bank data arrives
  logic          s1_valid, s1_last, s1_eof, s1_noff;
  logic [PB-1:0] s1_phase;
  logic [BW-1:0] s1_bsel [WIN];
  logic [WIN-1:0] s1_inr;
  pix_t          win [WIN];
  logic [WIN-1:0] vedge;
  logic          ring;
  filt_sel_e     sel;

  always_comb begin
    for (int i = 0; i < WIN; i++) win[i] = bank_q[s1_bsel[i]];
    vedge = '0;
    for (int i = 1; i < WIN - 1; i++) begin
      pix_t d;
      d = (win[i + 1] > win[i - 1]) ? win[i + 1] - win[i - 1] : win[i - 1] - win[i + 1];
      vedge[i] = s1_inr[i] && (d > cfg_thresh);
    end
    begin
      logic dil;
      int   c;
      c   = DIL + 1 + int'(s1_noff);
      dil = 1'b0;
      for (int d = -DIL; d <= DIL; d++) dil |= vedge[c + d];
      ring = dil ^ vedge[c];
    end
    sel = ring ? FILT_A_SMOOTH : FILT_B_SHARP;
  end

  // --------------------------------- stage 2: coefficients and filter taps
  logic      s2_valid, s2_last, s2_eof;
  filt_sel_e s2_sel;
  pix_t      s2_taps [TAPS];
  coef_t     coefs [TAPS];

  coeff_bank #(.PB(PB)) u_coef (
    .clk  (clk),
    .en   (en),
    .sel  (sel),
    .phase(s1_phase),
    .coef (coefs)
  );

  // ------------------------------------------------ stage 3: filter output
  polyphase_filter #(.R(TAPS)) u_filt (
    .clk      (clk),
    .rst_n    (rst_n),
    .en       (en),
    .in_valid (s2_valid),
    .taps     (s2_taps),
    .coefs    (coefs),
    .out_valid(out_valid),
    .out_pix  (out_pix)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid <= 1'b0;
      s1_last  <= 1'b0;
      s1_eof   <= 1'b0;
      s1_noff  <= 1'b0;
      s1_phase <= '0;
      s1_inr   <= '0;
      s1_bsel  <= '{default: '0};
      s2_valid <= 1'b0;
      s2_last  <= 1'b0;
      s2_eof   <= 1'b0;
      s2_sel   <= FILT_B_SHARP;
      s2_taps  <= '{default: '0};
      out_last <= 1'b0;
      out_eof  <= 1'b0;
      out_filt <= FILT_B_SHARP;
    end else if (en) begin
      s1_valid <= issue;
      s1_last  <= col_last;
      s1_eof   <= col_last && dda_last;
      s1_noff  <= noff;
      s1_phase <= phase;
      s1_inr   <= inr;
      s1_bsel  <= bsel;
      s2_valid <= s1_valid;
      s2_last  <= s1_last;
      s2_eof   <= s1_eof;
      s2_sel   <= sel;
      for (int t = 0; t < TAPS; t++) s2_taps[t] <= win[DIL + t];
      out_last <= s2_last;
      out_eof  <= s2_eof;
      out_filt <= s2_sel;
    end
  end

  // ---------------------------------------------------------- bookkeeping
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fstate      <= F_START;
      fh          <= '0;
      wy          <= '0;
      wbank       <= '0;
      wx          <= '0;
      fw          <= '0;
      line_active <= 1'b0;
      rx          <= '0;
    end else begin
      case (fstate)
        F_START: begin
          if (in_valid) begin
            fh     <= cfg_h;
            fstate <= F_RUN;
          end
        end
        F_RUN: begin
          if (!dda_valid && !line_active) begin
            fstate <= F_START;
            wy     <= '0;
            wbank  <= '0;
            wx     <= '0;
          end
        end
        default: fstate <= F_START;
      endcase

      if (accept) begin
        if (eff_last) begin
          if (wy == '0) fw <= {1'b0, wx} + 1'b1;
          wy    <= wy + 1'b1;
          wbank <= (wbank == BW'(NB - 1)) ? '0 : wbank + 1'b1;
          wx    <= '0;
        end else begin
          wx <= wx + 1'b1;
        end
      end

      if (can_start) begin
        line_active <= 1'b1;
        rx          <= '0;
      end else if (issue) begin
        if (col_last) line_active <= 1'b0;
        rx <= rx + 1'b1;
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n)
                   out_valid && !out_ready |=> out_valid && $stable(out_pix) && $stable(out_last))
    else $error("output changed while stalled");

endmodule
