// coeff_bank: polyphase coefficient store for the two interpolation filters.
//
// Holds 2 filters x 2^PHASE_BITS phases x 4 taps. Filter A (sel = 1) is the
// low-ringing kernel used inside ringing areas, filter B (sel = 0) the sharp
// kernel used elsewhere; see scaler_pkg for the kernels, the fixed-point
// format and the rounding rule. The table is computed at elaboration from
// the kernel formulas, so it synthesises to a constant ROM.
//
// Timing: with en high, the four coefficients of (sel, phase) appear on coef
// after the next clock edge; they hold while en is low. Coefficient order is
// tap 0..3 = input pixels k-1, k, k+1, k+2 for an output at k + phase/2^PHASE_BITS.
//
// Two complementary filters, one barely ringing and one with a steep
// transition, are the scaler's concept; the kernels and the number format
// are this design's choices.
module coeff_bank
  import scaler_pkg::*;
#(
  parameter int PB   = PHASE_BITS,
  parameter int FRAC = COEF_FRAC
) (
  input  logic          clk,
  input  logic          en,
  input  filt_sel_e     sel,
  input  logic [PB-1:0] phase,
  output coef_t         coef [TAPS]
);

  localparam int P = 1 << PB;

  coef_t table_c [2][P][TAPS];

  for (genvar f = 0; f < 2; f++) begin : g_f
    for (genvar p = 0; p < P; p++) begin : g_p
      for (genvar t = 0; t < TAPS; t++) begin : g_t
        localparam int C = coef_value(f, p, t, PB, FRAC);
        assign table_c[f][p][t] = COEF_W'(C);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (en) begin
      for (int t = 0; t < TAPS; t++) coef[t] <= table_c[sel][phase][t];
    end
  end

endmodule
