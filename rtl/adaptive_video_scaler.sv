// adaptive_video_scaler: two-dimensional rational-factor video scaler whose
// interpolation filter adapts to the picture to keep edges sharp without
// ringing.
//
// Every output pixel is interpolated from 4 input pixels per direction with
// one of two kernels: a sharp one (filter B) that keeps fine detail, or a
// smooth one with no overshoot (filter A). Filter A is used only in the
// "ringing area": smooth pixels within a few pixels of a strong edge, where
// the overshoot of a sharp filter would be visible. The area is found by
// detecting edges, dilating the edge map and XORing it with the edge map.
//
// The picture goes through two stages in series:
//   vertical_scaler   : scales by cfg_lv/cfg_mv, classifying along columns
//   horizontal_scaler : scales by cfg_lh/cfg_mh, classifying along lines;
//                       its four-bank parallel line memory gives one output
//                       pixel per clock for any ratio, up or down
// Scaling vertically first keeps the vertical line store at the input width.
//
// Interface: input pixels in raster order with valid/ready, in_last on the
// last pixel of each line; a frame is cfg_h lines. Output pixels in raster
// order with valid/ready, out_last per line, out_eof on the last pixel of the
// frame, out_filt the horizontal filter used. cfg_lv, cfg_mv and cfg_h are
// sampled at the first pixel of each frame, cfg_lh and cfg_mh at the start of
// every output line of the horizontal stage: change them only between frames.
// cfg_thresh is the edge threshold of both stages.
// Timing: the horizontal stage sends one pixel per clock within a line; lines
// follow each other as fast as the vertical stage delivers them.
//
// The adaptive filter choice and the parallel horizontal line memory are the
// scaler's concept; the vertical stage, the vertical-then-horizontal order,
// the shared threshold and the frame interface are this design's choices.
module adaptive_video_scaler
  import scaler_pkg::*;
#(
  parameter int MAX_W = 1920,  // longest input line
  parameter int MAX_H = 1080,  // most input lines per frame
  parameter int DIL   = 2,     // dilation radius of the ringing maps
  localparam int YW   = $clog2(MAX_H)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [SCALE_W-1:0] cfg_lh,
  input  logic [SCALE_W-1:0] cfg_mh,
  input  logic [SCALE_W-1:0] cfg_lv,
  input  logic [SCALE_W-1:0] cfg_mv,
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

  logic      v_valid, v_ready, v_last, v_eof;
  pix_t      v_pix;
  filt_sel_e v_filt_unused;

  vertical_scaler #(.MAX_W(MAX_W), .MAX_H(MAX_H), .DIL(DIL)) u_v (
    .clk       (clk),
    .rst_n     (rst_n),
    .cfg_l     (cfg_lv),
    .cfg_m     (cfg_mv),
    .cfg_h     (cfg_h),
    .cfg_thresh(cfg_thresh),
    .in_valid  (in_valid),
    .in_ready  (in_ready),
    .in_pix    (in_pix),
    .in_last   (in_last),
    .out_valid (v_valid),
    .out_ready (v_ready),
    .out_pix   (v_pix),
    .out_last  (v_last),
    .out_eof   (v_eof),
    .out_filt  (v_filt_unused)
  );

  horizontal_scaler #(.MAX_W(MAX_W), .DIL(DIL)) u_h (
    .clk       (clk),
    .rst_n     (rst_n),
    .cfg_l     (cfg_lh),
    .cfg_m     (cfg_mh),
    .cfg_thresh(cfg_thresh),
    .in_valid  (v_valid),
    .in_ready  (v_ready),
    .in_pix    (v_pix),
    .in_last   (v_last),
    .in_eof    (v_eof),
    .out_valid (out_valid),
    .out_ready (out_ready),
    .out_pix   (out_pix),
    .out_last  (out_last),
    .out_eof   (out_eof),
    .out_filt  (out_filt)
  );

endmodule
