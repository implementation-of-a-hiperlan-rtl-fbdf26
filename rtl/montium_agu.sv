// Address generation unit that accompanies a Montium local memory.
//
// Produces the address sequence base, base+stride, base+2*stride, ... modulo the
// memory depth. 'start' loads base (and the stride used from then on); 'step'
// advances to the next address. addr is registered and valid in the cycle after
// start or step. The Montium description only names the AGU as reconfigurable;
// the base/stride counter is this design's own, simplest choice.
module montium_agu #(
  parameter int AW = 9
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [AW-1:0] base,
  input  logic [AW-1:0] stride,
  input  logic          step,
  output logic [AW-1:0] addr
);
  logic [AW-1:0] stride_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      addr     <= '0;
      stride_q <= '0;
    end else if (start) begin
      addr     <= base;
      stride_q <= stride;
    end else if (step) begin
      addr     <= addr + stride_q;
    end
  end
endmodule
