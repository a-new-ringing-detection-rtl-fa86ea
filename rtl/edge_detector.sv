// edge_detector: raw edge map of one video line, built as the line streams in.
//
// A pixel x[n] is an edge pixel when the central difference around it is
// larger than a programmable threshold:
//     e[n] = |x[n+1] - x[n-1]| > thresh
// with pixels beyond the ends of the line replaced by the end pixel. Finding
// salient edges first is the first classification step of the scaler; the
// operator (central difference against a threshold) is this design's choice.
//
// Interface: every accepted pixel is presented with in_valid, its index in
// the line (in_idx, 0 for the first pixel) and in_last on the final pixel.
// The detector keeps the two previous pixels. When x[n] arrives it decides
// e[n-1] on port 0; on the last pixel it also decides e[n] on port 1
// (for a one-pixel line, e[0] = 0). Both ports are combinational in the cycle
// the pixel is accepted, so the caller writes them together with the pixel.
module edge_detector
  import scaler_pkg::*;
#(
  parameter int MAX_W = 1920,
  localparam int IW   = $clog2(MAX_W)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic [IW-1:0] in_idx,
  input  logic          in_last,
  input  pix_t          in_pix,
  input  pix_t          thresh,
  output logic          e0_we,
  output logic [IW-1:0] e0_idx,
  output logic          e0_val,
  output logic          e1_we,
  output logic [IW-1:0] e1_idx,
  output logic          e1_val
);

  pix_t p1, p2;  // x[n-1], x[n-2] of the current line

  function automatic logic above(pix_t a, pix_t b, pix_t t);
    pix_t d;
    d = (a > b) ? a - b : b - a;
    return d > t;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p1 <= '0;
      p2 <= '0;
    end else if (in_valid) begin
      p2 <= p1;
      p1 <= in_pix;
    end
  end

  pix_t left;  // x[n-2], replicated from x[0] when n == 1
  assign left = (in_idx == IW'(1)) ? p1 : p2;

  always_comb begin
    e0_we  = in_valid && (in_idx != '0);
    e0_idx = in_idx - IW'(1);
    e0_val = above(in_pix, left, thresh);
    e1_we  = in_valid && in_last;
    e1_idx = in_idx;
    e1_val = (in_idx != '0) && above(in_pix, p1, thresh);
  end

endmodule
