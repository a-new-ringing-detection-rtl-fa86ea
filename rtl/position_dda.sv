// position_dda: walks the output pixels of one line and tells, for each, which
// input pixels and which filter phase it needs.
//
// Rational scaling by L/M (L up, M down) maps output pixel m to the input
// position m*M/L: integer part k = floor(m*M/L), remainder r = (m*M) mod L,
// which selects the polyphase phase g_m. Instead of multiplying, the walker
// keeps (k, r) and adds M/L per output, split at the start of a line into a
// quotient q = M div L and a remainder step s = M mod L:
//     r' = r + s; carry = r' >= L; r' -= carry*L; k' = k + q + carry
// Output pixels are produced while k < width, so a line of W input pixels
// gives ceil(W*L/M) outputs and no unwanted pixel is ever computed. The
// stored phase index is the remainder quantised to 2^PB phases,
// phase = floor(r * 2^PB / L). L, M and the width are sampled at start, so
// they may change between lines.
//
// Timing: start (while idle) loads the line; from the next cycle valid is
// high with (k, r, phase) of output 0. Each cycle with adv high moves to the
// next output; last marks the final output of the line, after which valid
// drops. L = 0 is treated as 1.
//
// The mapping m -> (floor(mM/L), mM mod L) is the polyphase scaling rule;
// the incremental form, the 64-phase quantisation and the alignment of
// output 0 on input pixel 0 are this design's choices.
module position_dda
  import scaler_pkg::*;
#(
  parameter int MAX_W = 1920,
  parameter int PB    = PHASE_BITS,
  localparam int IW   = $clog2(MAX_W),
  localparam int KW   = IW + SCALE_W + 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic [SCALE_W-1:0] cfg_l,
  input  logic [SCALE_W-1:0] cfg_m,
  input  logic [IW:0]        width,
  input  logic               adv,
  output logic               valid,
  output logic [IW-1:0]      k,
  output logic [SCALE_W-1:0] r,
  output logic [PB-1:0]      phase,
  output logic               last
);

  logic [SCALE_W-1:0] l_q, q_q, s_q;
  logic [IW:0]        w_q;
  logic [KW-1:0]      k_q, k_nx;
  logic [SCALE_W:0]   r_sum;
  logic               carry;
  logic [SCALE_W-1:0] l_eff;

  assign l_eff = (cfg_l == '0) ? SCALE_W'(1) : cfg_l;

  always_comb begin
    r_sum = {1'b0, r} + {1'b0, s_q};
    carry = r_sum >= {1'b0, l_q};
    k_nx  = k_q + KW'(q_q) + KW'(carry);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid <= 1'b0;
      k_q   <= '0;
      r     <= '0;
      l_q   <= SCALE_W'(1);
      q_q   <= '0;
      s_q   <= '0;
      w_q   <= '0;
    end else if (start) begin
      valid <= (width != '0);
      k_q   <= '0;
      r     <= '0;
      l_q   <= l_eff;
      q_q   <= cfg_m / l_eff;
      s_q   <= cfg_m % l_eff;
      w_q   <= width;
    end else if (adv && valid) begin
      k_q   <= k_nx;
      r     <= carry ? SCALE_W'(r_sum - {1'b0, l_q}) : r_sum[SCALE_W-1:0];
      if (last) valid <= 1'b0;
    end
  end

  assign k     = k_q[IW-1:0];
  assign last  = valid && (k_nx >= KW'(w_q));
  assign phase = PB'(({{PB{1'b0}}, r} << PB) / {{PB{1'b0}}, l_q});

endmodule
