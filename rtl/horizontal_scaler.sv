// horizontal_scaler: rational-factor horizontal scaling stage that adapts its
// interpolation filter to the picture content to avoid ringing.
//
// Each input line streams into a parallel line memory of R = 4 interleaved
// banks while an edge detector builds the line's raw edge map. Once a whole
// line is stored, the output side walks the wanted output positions of that
// line (position_dda), reads the four neighbouring input pixels in one cycle
// from the four banks, and interpolates them with a 4-tap polyphase filter.
// The coefficients come from one of two filters: the low-ringing filter A
// when the nearest input pixel lies in the ringing area (a non-edge pixel
// within DIL pixels of an edge, from ringing_area_estimator), and the sharp
// filter B everywhere else, edges included. One structure does up scaling
// (L > M) and down scaling (L < M): it only ever computes wanted pixels, so
// there is no second scaling unit and no output FIFO.
//
// Line flow: the memory has two line slots. Line j is written into one slot
// while line j-1 is read from the other, so reading trails writing by one
// line. in_ready drops while both slots hold unread lines (input stall, the
// normal case when up scaling, where a line takes longer to read than to
// write). Line length is given by in_last; a line reaching MAX_W pixels is
// closed there. L, M and the edge threshold are sampled per line: L and M
// when the line starts to be read, the threshold while it is written.
//
// Interfaces: valid/ready on input and output. Output timing: one pixel per
// clock while out_ready is high; the first output of a line comes three
// clocks after the read of the line starts (start, address, memory/coefficient
// read, filter). out_last marks the final pixel of each output line and
// out_filt tells which filter produced the pixel. in_eof, given with in_last
// on the last line of a frame, comes back as out_eof on the last pixel of
// the corresponding output line.
//
// From the scaler concept: the two complementary filters, edge detection
// followed by dilation and XOR for the ringing map, the R-bank line memory
// with a fixed write/read distance, polyphase interpolation by Eq. (1).
// This design's own choices: all widths, the kernels, the edge operator, the
// 1-D ringing map, nearest-pixel filter selection, the handshakes.
module horizontal_scaler
  import scaler_pkg::*;
#(
  parameter int MAX_W = 1920,       // longest input line (1080p width)
  parameter int R     = TAPS,       // taps per phase = memory banks
  parameter int PB    = PHASE_BITS, // stored phases = 2^PB
  parameter int DIL   = 2,          // dilation radius of the ringing map
  localparam int IW   = $clog2(MAX_W)
) (
  input  logic               clk,
  input  logic               rst_n,
  // configuration
  input  logic [SCALE_W-1:0] cfg_l,       // up-scaling factor L
  input  logic [SCALE_W-1:0] cfg_m,       // down-scaling factor M
  input  pix_t               cfg_thresh,  // edge threshold
  // input pixel stream
  input  logic               in_valid,
  output logic               in_ready,
  input  pix_t               in_pix,
  input  logic               in_last,
  input  logic               in_eof,
  // output pixel stream
  output logic               out_valid,
  input  logic               out_ready,
  output pix_t               out_pix,
  output logic               out_last,
  output logic               out_eof,
  output filt_sel_e          out_filt
);

  localparam int P = 1 << PB;

  // ------------------------------------------------------------------ write
  logic          wslot, rslot;
  logic [1:0]    full;
  logic [IW:0]   width_q [2];
  logic [1:0]    eof_q;
  logic [IW-1:0] wcnt;
  logic          accept, eff_last;

  assign in_ready = !full[wslot];
  assign accept   = in_valid && in_ready;
  assign eff_last = in_last || (wcnt == IW'(MAX_W - 1));

  logic          e0_we, e0_val, e1_we, e1_val;
  logic [IW-1:0] e0_idx, e1_idx;

  edge_detector #(.MAX_W(MAX_W)) u_edge (
    .clk     (clk),
    .rst_n   (rst_n),
    .in_valid(accept),
    .in_idx  (wcnt),
    .in_last (eff_last),
    .in_pix  (in_pix),
    .thresh  (cfg_thresh),
    .e0_we   (e0_we),
    .e0_idx  (e0_idx),
    .e0_val  (e0_val),
    .e1_we   (e1_we),
    .e1_idx  (e1_idx),
    .e1_val  (e1_val)
  );

  // ------------------------------------------------------------------- read
  logic               busy, start, en, issue, done_line;
  logic               dda_valid, dda_last;
  logic [IW-1:0]      k;
  logic [SCALE_W-1:0] r_unused;
  logic [PB-1:0]      phase;
  logic [IW:0]        rwidth;

  assign rwidth    = width_q[rslot];
  assign start     = !busy && full[rslot];
  assign en        = !out_valid || out_ready;
  assign issue     = en && dda_valid;
  assign done_line = issue && dda_last;

  position_dda #(.MAX_W(MAX_W), .PB(PB)) u_dda (
    .clk  (clk),
    .rst_n(rst_n),
    .start(start),
    .cfg_l(cfg_l),
    .cfg_m(cfg_m),
    .width(rwidth),
    .adv  (issue),
    .valid(dda_valid),
    .k    (k),
    .r    (r_unused),
    .phase(phase),
    .last (dda_last)
  );

  // Nearest input pixel decides the filter.
  logic [IW:0]   near_x;
  logic [IW-1:0] near;
  logic          ring, edge_unused;
  filt_sel_e     sel;

  always_comb begin
    near_x = {1'b0, k} + ((phase >= PB'(P / 2)) ? (IW+1)'(1) : '0);
    if (near_x >= rwidth) near_x = rwidth - 1;
    near = near_x[IW-1:0];
  end

  ringing_area_estimator #(.MAX_W(MAX_W), .SLOTS(2), .DIL(DIL)) u_ring (
    .clk   (clk),
    .wslot (wslot),
    .e0_we (e0_we),
    .e0_idx(e0_idx),
    .e0_val(e0_val),
    .e1_we (e1_we),
    .e1_idx(e1_idx),
    .e1_val(e1_val),
    .rslot (rslot),
    .ridx  (near),
    .rwidth(rwidth),
    .edge_o(edge_unused),
    .ring_o(ring)
  );

  assign sel = ring ? FILT_A_SMOOTH : FILT_B_SHARP;

  pix_t  taps  [R];
  coef_t coefs [R];
  logic signed [IW+1:0] rbase;

  assign rbase = $signed({2'b00, k}) - (IW+2)'(R / 2 - 1);

  parallel_line_memory #(.R(R), .MAX_W(MAX_W), .SLOTS(2)) u_mem (
    .clk   (clk),
    .we    (accept),
    .wslot (wslot),
    .widx  (wcnt),
    .wdata (in_pix),
    .re    (issue),
    .rslot (rslot),
    .rbase (rbase),
    .rwidth(rwidth),
    .rdata (taps)
  );

  coeff_bank #(.PB(PB)) u_coef (
    .clk  (clk),
    .en   (issue),
    .sel  (sel),
    .phase(phase),
    .coef (coefs)
  );

  // Stage 1: memory and coefficient outputs; stage 2: filter output.
  logic      s1_valid, s1_last, s1_eof;
  filt_sel_e s1_sel;

  polyphase_filter #(.R(R)) u_filt (
    .clk      (clk),
    .rst_n    (rst_n),
    .en       (en),
    .in_valid (s1_valid),
    .taps     (taps),
    .coefs    (coefs),
    .out_valid(out_valid),
    .out_pix  (out_pix)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid <= 1'b0;
      s1_last  <= 1'b0;
      s1_eof   <= 1'b0;
      out_eof  <= 1'b0;
      s1_sel   <= FILT_B_SHARP;
      out_last <= 1'b0;
      out_filt <= FILT_B_SHARP;
    end else if (en) begin
      s1_valid <= issue;
      s1_last  <= dda_last;
      s1_eof   <= dda_last && eof_q[rslot];
      out_eof  <= s1_eof;
      s1_sel   <= sel;
      out_last <= s1_last;
      out_filt <= s1_sel;
    end
  end

  // ------------------------------------------------------- slot bookkeeping
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wslot   <= 1'b0;
      rslot   <= 1'b0;
      full    <= '0;
      wcnt    <= '0;
      busy    <= 1'b0;
      width_q <= '{default: '0};
      eof_q   <= '0;
    end else begin
      if (accept) begin
        if (eff_last) begin
          full[wslot]    <= 1'b1;
          width_q[wslot] <= {1'b0, wcnt} + 1'b1;
          eof_q[wslot]   <= in_last && in_eof;
          wslot          <= ~wslot;
          wcnt           <= '0;
        end else begin
          wcnt <= wcnt + 1'b1;
        end
      end
      if (start) busy <= 1'b1;
      if (done_line) begin
        busy        <= 1'b0;
        full[rslot] <= 1'b0;
        rslot       <= ~rslot;
      end
    end
  end

  // Output handshake: a pixel that is not taken stays unchanged.
  assert property (@(posedge clk) disable iff (!rst_n)
                   out_valid && !out_ready |=> out_valid && $stable(out_pix) && $stable(out_last))
    else $error("output changed while stalled");

endmodule
