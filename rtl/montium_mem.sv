// Montium local memory: 512 words of 16 bits.
//
// One write port and one read port, usable in the same cycle. A write (we, waddr,
// wdata) takes effect at the rising clock edge. The read is synchronous: raddr
// presented in one cycle gives rdata in the next, like an SRAM macro. The same memory
// serves as a lookup table by presenting the table index as raddr. Size and width
// follow the Montium description (16 bits x 512 = 8 Kbit); the separate read and
// write ports and the one-cycle read latency are this design's own choices. The
// contents are not reset; they are written through the tile's configuration unit.
module montium_mem #(
  parameter int DEPTH = 512,
  parameter int W     = 16
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [W-1:0]             wdata,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [W-1:0]             rdata
);
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule
