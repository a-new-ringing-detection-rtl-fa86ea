// ringing_area_estimator: stores the raw edge map of buffered lines and turns
// it into the ringing map that selects the interpolation filter.
//
// The ringing map follows the second classification step of the scaler: the
// raw edge map is dilated (a binary dilation with a 1 x (2*DIL+1) structuring
// element marks the support where a sharp filter would ring around an edge)
// and the dilated map is XORed with the raw edge map. What remains is the
// band of non-edge pixels next to an edge, the "ringing area":
//     ring[i] = (OR_{|d| <= DIL} e[i+d]) XOR e[i]
// Positions outside 0 .. rwidth-1 count as non-edge. The one-dimensional
// structuring element and its radius DIL = R/2 = 2 (the reach of a 4-tap
// kernel) are this design's choices.
//
// Storage: one bit per pixel for each of SLOTS line slots, matching the slots
// of the parallel line memory. Two write ports (from edge_detector) update
// slot wslot at the clock edge; the read (rslot, ridx) is combinational.
module ringing_area_estimator #(
  parameter int MAX_W = 1920,
  parameter int SLOTS = 2,
  parameter int DIL   = 2,
  localparam int IW   = $clog2(MAX_W),
  localparam int SW   = (SLOTS > 1) ? $clog2(SLOTS) : 1
) (
  input  logic          clk,
  input  logic [SW-1:0] wslot,
  input  logic          e0_we,
  input  logic [IW-1:0] e0_idx,
  input  logic          e0_val,
  input  logic          e1_we,
  input  logic [IW-1:0] e1_idx,
  input  logic          e1_val,
  input  logic [SW-1:0] rslot,
  input  logic [IW-1:0] ridx,
  input  logic [IW:0]   rwidth,
  output logic          edge_o,
  output logic          ring_o
);

  logic [MAX_W-1:0] emap [SLOTS];

  always_ff @(posedge clk) begin
    if (e0_we) emap[wslot][e0_idx] <= e0_val;
    if (e1_we) emap[wslot][e1_idx] <= e1_val;
  end

  logic dilated;
  always_comb begin
    dilated = 1'b0;
    for (int d = -DIL; d <= DIL; d++) begin
      int j;
      j = int'(ridx) + d;
      if (j >= 0 && j < int'(rwidth)) dilated |= emap[rslot][j];
    end
    edge_o = (int'(ridx) < int'(rwidth)) && emap[rslot][ridx];
    ring_o = dilated ^ edge_o;
  end

endmodule
