// Montium ALU, a purely combinational 16-bit signed fixed-point unit.
//
// Four 16-bit inputs A, B, C, D, two 16-bit outputs OUT1, OUT2, and a direct
// neighbour link: the 32-bit E (east) input comes from the ALU on the right and the
// W (west) output goes to the ALU on the left, without any register. Level 1 adds
// and subtracts C and D; level 2 multiplies A by B and adds or subtracts E. The result
// z is scaled by a rounding right shift (shift) and saturated to 16 bits on OUT1.
//   ALU_MUL    : z = A*B          OUT1 = sat(z >> shift)  OUT2 = z[31:16]  W = z
//   ALU_MULADD : z = A*B + E      (as above)
//   ALU_MULSUB : z = A*B - E      (as above)
//   ALU_ADDSUB : OUT1 = sat((C+D) >> shift), OUT2 = sat((C-D) >> shift), W = C+D
// Four inputs, two outputs, combinational operation and the east-west link follow the
// Montium description; the operation set, the 32-bit width of the east-west link and
// the shift/saturate stage are this design's own choices (the configurable ALU
// function itself is not specified).
module montium_alu
  import hl2_pkg::*;
#(
  parameter int W = 16
) (
  input  alu_op_e               op,
  input  logic [4:0]            shift,
  input  logic signed [W-1:0]   a,
  input  logic signed [W-1:0]   b,
  input  logic signed [W-1:0]   c,
  input  logic signed [W-1:0]   d,
  input  logic signed [2*W-1:0] east_in,
  output logic signed [W-1:0]   out1,
  output logic signed [W-1:0]   out2,
  output logic signed [2*W-1:0] west_out
);
  logic signed [47:0] prod, z, s, dif;

  always_comb begin
    prod = 48'(a) * 48'(b);
    s    = 48'(c) + 48'(d);
    dif  = 48'(c) - 48'(d);
    unique case (op)
      ALU_MUL:    z = prod;
      ALU_MULADD: z = prod + 48'(east_in);
      ALU_MULSUB: z = prod - 48'(east_in);
      default:    z = s;
    endcase
    if (op == ALU_ADDSUB) begin
      out1 = sat16(rshift_round(s, shift));
      out2 = sat16(rshift_round(dif, shift));
    end else begin
      out1 = sat16(rshift_round(z, shift));
      out2 = z[31:16];
    end
    west_out = z[2*W-1:0];
  end
endmodule
