// Configuration side of the Montium Communication and Configuration Unit (CCU).
//
// The tile is configured through a 16-bit wide interface, one word per clock cycle.
// A word with cfg_hdr set is a header: bits [12:9] select the target memory (0..9
// for M01..M10, 15 for the tile's register space) and bits [8:0] the start address.
// Every following word without cfg_hdr is data, written to the selected memory at
// the current address, which then increments. The write appears on wr_* one cycle
// after the word was accepted. So configuring N data words costs N plus one cycle per
// header. The 16-bit width follows the document; the header layout is this design's
// own choice (the off-tile interface depends on the on-chip network, which is not
// specified).
module montium_ccu #(
  parameter int W = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         cfg_valid,
  input  logic         cfg_hdr,
  input  logic [W-1:0] cfg_data,
  output logic         wr_en,
  output logic [3:0]   wr_mem,
  output logic [8:0]   wr_addr,
  output logic [W-1:0] wr_data
);
  logic [3:0] sel_q;
  logic [8:0] addr_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sel_q   <= '0;
      addr_q  <= '0;
      wr_en   <= 1'b0;
      wr_mem  <= '0;
      wr_addr <= '0;
      wr_data <= '0;
    end else begin
      wr_en <= 1'b0;
      if (cfg_valid && cfg_hdr) begin
        sel_q  <= cfg_data[12:9];
        addr_q <= cfg_data[8:0];
      end else if (cfg_valid) begin
        wr_en   <= 1'b1;
        wr_mem  <= sel_q;
        wr_addr <= addr_q;
        wr_data <= cfg_data;
        addr_q  <= addr_q + 9'd1;
      end
    end
  end
endmodule
