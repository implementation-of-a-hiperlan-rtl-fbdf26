// Input register file of one Montium ALU input.
//
// Holds up to four 16-bit operands. An ALU input always reads one of these registers:
// there is no bypass from the write port to the read port, so a value written at a
// clock edge is readable from the next cycle on. Write: we, wsel, wdata, taken at the
// rising clock edge. Read: rsel selects the entry driving rdata combinationally.
// Four entries and 16 bits follow the Montium description; the synchronous active-low
// reset that clears the entries is this design's own choice.
module montium_regfile #(
  parameter int DEPTH = 4,
  parameter int W     = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] wsel,
  input  logic [W-1:0]             wdata,
  input  logic [$clog2(DEPTH)-1:0] rsel,
  output logic [W-1:0]             rdata
);
  logic [W-1:0] regs [DEPTH];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) regs[i] <= '0;
    end else if (we) begin
      regs[wsel] <= wdata;
    end
  end

  assign rdata = regs[rsel];
endmodule
