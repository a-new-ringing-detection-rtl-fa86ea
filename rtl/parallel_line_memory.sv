// parallel_line_memory: line buffer split into R interleaved banks so that the
// R input pixels one output pixel needs are read in a single clock cycle.
//
// Pixel j of a line lives in bank (j mod R) at word (j div R) of its line
// slot. Any R consecutive pixels therefore fall into R different banks, so
// the polyphase filter gets a whole tap window per cycle whatever the scaling
// ratio is, and only the wanted output pixels are ever computed: up and down
// scaling share one unit and no output FIFO is needed. The memory holds
// SLOTS line slots; the scaler writes a new line into one slot while it reads
// the previous line from another, so reading follows writing at a fixed
// distance of one line and the two never touch the same words. The banked
// arrangement with R = 4 is the scaler's memory architecture; the two-slot
// ping-pong is this design's way of keeping reads and writes apart.
//
// Write port: one pixel per cycle at (wslot, widx).
// Read port: with re high, rbase is the (signed) index of the first tap,
// k - (R/2 - 1) for an output between pixels k and k+1. One cycle later
// rdata[i] holds pixel rbase + i of slot rslot, where indices outside
// 0 .. rwidth-1 are replaced by the nearest end pixel of the line (edge
// replication). rdata holds while re is low. R must be a power of two.
module parallel_line_memory
  import scaler_pkg::*;
#(
  parameter int R     = TAPS,
  parameter int MAX_W = 1920,
  parameter int SLOTS = 2,
  localparam int IW   = $clog2(MAX_W),
  localparam int SW   = (SLOTS > 1) ? $clog2(SLOTS) : 1,
  localparam int WB   = (MAX_W + R - 1) / R,   // words per slot in each bank
  localparam int DEPTH = SLOTS * WB,
  localparam int AW   = $clog2(DEPTH),
  localparam int RB   = $clog2(R)
) (
  input  logic                 clk,
  input  logic                 we,
  input  logic [SW-1:0]        wslot,
  input  logic [IW-1:0]        widx,
  input  pix_t                 wdata,
  input  logic                 re,
  input  logic [SW-1:0]        rslot,
  input  logic signed [IW+1:0] rbase,
  input  logic [IW:0]          rwidth,
  output pix_t                 rdata [R]
);

  if ((1 << RB) != R) begin : g_bad_r
    $error("parallel_line_memory: R must be a power of two");
  end

  pix_t                 bank_q [R];
  logic signed [IW+1:0] base_q;
  logic [IW:0]          width_q;

  for (genvar b = 0; b < R; b++) begin : g_bank
    logic [AW-1:0]        waddr, raddr;
    logic [RB-1:0]        off;
    logic signed [IW+1:0] j;

    assign waddr = AW'(wslot * WB + 32'(widx >> RB));
    // The window member that falls into bank b.
    assign off   = RB'(b) - rbase[RB-1:0];
    assign j     = rbase + (IW+2)'(off);
    assign raddr = (j < 0 || j >= $signed({1'b0, rwidth})) ? AW'(rslot * WB)
                                                              : AW'(rslot * WB + 32'(j >>> RB));

    line_mem_bank #(.DW(PIX_W), .DEPTH(DEPTH)) u_bank (
      .clk  (clk),
      .we   (we && widx[RB-1:0] == RB'(b)),
      .waddr(waddr),
      .wdata(wdata),
      .re   (re),
      .raddr(raddr),
      .rdata(bank_q[b])
    );
  end

  always_ff @(posedge clk) begin
    if (re) begin
      base_q  <= rbase;
      width_q <= rwidth;
    end
  end

  // Edge replication: tap i shows pixel clamp(base + i), which always lies in
  // the window that was read as long as the output position is inside the line.
  for (genvar i = 0; i < R; i++) begin : g_tap
    logic signed [IW+1:0] ci;
    always_comb begin
      ci = base_q + (IW+2)'(i);
      if (ci < 0) ci = '0;
      if (ci >= $signed({1'b0, width_q})) ci = $signed({1'b0, width_q}) - 1;
      rdata[i] = bank_q[ci[RB-1:0]];
    end
  end

endmodule
