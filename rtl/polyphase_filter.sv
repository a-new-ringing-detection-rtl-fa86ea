// polyphase_filter: one phase of the polyphase interpolation filter, an R-tap
// multiply-accumulate with rounding and clipping.
//
//     y = clip( (sum_i x[i] * c[i] + 2^(FRAC-1)) >> FRAC , 0, 2^PIX_W - 1 )
//
// The taps come from the parallel line memory and the coefficients from the
// coefficient bank in the same cycle, so the whole window is filtered in one
// clock: one output pixel per cycle. Rounding half up and clipping to the
// pixel range are this design's choices.
//
// Timing: one register stage. With en high, in_valid/taps/coefs are taken at
// the clock edge and out_valid/out_pix show the result; with en low the
// output holds (pipeline stall).
module polyphase_filter
  import scaler_pkg::*;
#(
  parameter int R    = TAPS,
  parameter int FRAC = COEF_FRAC
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en,
  input  logic  in_valid,
  input  pix_t  taps [R],
  input  coef_t coefs [R],
  output logic  out_valid,
  output pix_t  out_pix
);

  localparam int ACC_W = PIX_W + COEF_W + $clog2(R) + 1;

  logic signed [ACC_W-1:0] acc, rnd;
  pix_t                    y;

  always_comb begin
    acc = '0;
    for (int i = 0; i < R; i++)
      acc += $signed({1'b0, taps[i]}) * $signed(coefs[i]);
    rnd = (acc + ACC_W'(1 << (FRAC - 1))) >>> FRAC;
    if (rnd < 0)                        y = '0;
    else if (rnd > ACC_W'((1 << PIX_W) - 1)) y = '1;
    else                                y = rnd[PIX_W-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_pix   <= '0;
    end else if (en) begin
      out_valid <= in_valid;
      out_pix   <= y;
    end
  end

endmodule
