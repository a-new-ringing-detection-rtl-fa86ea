// line_mem_bank: one bank of the parallel line memory, a simple dual-port RAM
// with one write port and one registered read port on a single clock.
//
// Writes take effect at the clock edge; a read returns mem[raddr] one cycle
// after re is high, and rdata holds its value while re is low. The scaler
// never reads and writes the same address in one cycle (reading and writing
// use different line slots), so no read-during-write behaviour is defined.
// The array is left uninitialised, as a RAM macro would be. It is written as
// a plain array so that synthesis can map it to whatever RAM the target has;
// its organisation is this design's choice.
module line_mem_bank #(
  parameter int DW    = 8,
  parameter int DEPTH = 960,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [DW-1:0] wdata,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output logic [DW-1:0] rdata
);

  logic [DW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (re) rdata <= mem[raddr];
  end

endmodule
