// Single-cycle complex multiplier built from four Montium ALUs.
//
// p = (x * y) >> shift, rounded and saturated to 16-bit real and imaginary parts.
// Operands enter the ALU input register files (entry 0 of inputs A and B) when 'load'
// is high at a clock edge; the product is then available combinationally on p during
// the next cycle, because the ALUs are combinational. Each output part uses two ALUs
// chained through the east-west link:
//   ALU2: xi*yi  -> west -> ALU1: xr*yr - E = re
//   ALU4: xi*yr  -> west -> ALU3: xr*yi + E = im
// Using four of the five ALUs for one complex product per cycle follows the document;
// the register-file slot and the shift port are this design's own choices.
module montium_cmul
  import hl2_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       load,
  input  cplx_t      x,
  input  cplx_t      y,
  input  logic [4:0] shift,
  output cplx_t      p
);
  logic [15:0] ra [4];
  logic [15:0] rb [4];
  logic [15:0] wa [4];
  logic [15:0] wb [4];
  logic signed [31:0] w2, w4, e1, e3, wunused1, wunused3;
  logic [15:0] o2_unused [4];
  logic [15:0] o1_unused2, o1_unused4;

  // ALU1: xr*yr, ALU2: xi*yi, ALU3: xr*yi, ALU4: xi*yr
  assign wa = '{x.re, x.im, x.re, x.im};
  assign wb = '{y.re, y.im, y.im, y.re};

  for (genvar k = 0; k < 4; k++) begin : g_rf
    montium_regfile #(.DEPTH(4), .W(16)) u_rfa (
      .clk, .rst_n, .we(load), .wsel(2'd0), .wdata(wa[k]), .rsel(2'd0), .rdata(ra[k]));
    montium_regfile #(.DEPTH(4), .W(16)) u_rfb (
      .clk, .rst_n, .we(load), .wsel(2'd0), .wdata(wb[k]), .rsel(2'd0), .rdata(rb[k]));
  end

  assign e1 = w2;
  assign e3 = w4;

  montium_alu u_alu1 (.op(ALU_MULSUB), .shift, .a(ra[0]), .b(rb[0]), .c(16'sd0), .d(16'sd0),
                      .east_in(e1), .out1(p.re), .out2(o2_unused[0]), .west_out(wunused1));
  montium_alu u_alu2 (.op(ALU_MUL), .shift, .a(ra[1]), .b(rb[1]), .c(16'sd0), .d(16'sd0),
                      .east_in(32'sd0), .out1(o1_unused2), .out2(o2_unused[1]), .west_out(w2));
  montium_alu u_alu3 (.op(ALU_MULADD), .shift, .a(ra[2]), .b(rb[2]), .c(16'sd0), .d(16'sd0),
                      .east_in(e3), .out1(p.im), .out2(o2_unused[2]), .west_out(wunused3));
  montium_alu u_alu4 (.op(ALU_MUL), .shift, .a(ra[3]), .b(rb[3]), .c(16'sd0), .d(16'sd0),
                      .east_in(32'sd0), .out1(o1_unused4), .out2(o2_unused[3]), .west_out(w4));
endmodule
