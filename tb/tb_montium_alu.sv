// Testbench for montium_alu: random operands for all four operations, compared with
// a reference computed here in 64-bit integers (round half up, saturate to 16 bits).
module tb_montium_alu;
  import hl2_pkg::*;
  int checks = 0, failures = 0;
  alu_op_e op;
  logic [4:0] shift;
  logic signed [15:0] a, b, c, d, o1, o2;
  logic signed [31:0] e, w;

  montium_alu dut (.op, .shift, .a, .b, .c, .d, .east_in(e), .out1(o1), .out2(o2), .west_out(w));

  function automatic longint ref_sat(input longint v, input int sh);
    longint r;
    r = (sh == 0) ? v : ((v + (64'sd1 <<< (sh - 1))) >>> sh);
    if (r > 32767) r = 32767;
    if (r < -32768) r = -32768;
    return r;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint z, e1, e2;
    for (int i = 0; i < 2000; i++) begin
      op    = alu_op_e'(i % 4);
      shift = 5'($urandom_range(0, 16));
      a = 16'($urandom); b = 16'($urandom); c = 16'($urandom); d = 16'($urandom);
      e = 32'($urandom);
      if (i < 4) begin a = -16'sd32768; b = -16'sd32768; shift = 5'd0; end  // saturation
      #1;
      case (op)
        ALU_MUL:    z = longint'(a) * longint'(b);
        ALU_MULADD: z = longint'(a) * longint'(b) + longint'(e);
        ALU_MULSUB: z = longint'(a) * longint'(b) - longint'(e);
        default:    z = longint'(c) + longint'(d);
      endcase
      if (op == ALU_ADDSUB) begin
        e1 = ref_sat(longint'(c) + longint'(d), int'(shift));
        e2 = ref_sat(longint'(c) - longint'(d), int'(shift));
      end else begin
        e1 = ref_sat(z, int'(shift));
        e2 = longint'(signed'(z[31:16]));
      end
      checks++;
      if (longint'(o1) != e1 || longint'(o2) != e2 || w != 32'(z)) begin
        failures++;
        if (failures < 10) $display("op=%0d a=%0d b=%0d c=%0d d=%0d e=%0d sh=%0d: out1=%0d/%0d out2=%0d/%0d",
                                    op, a, b, c, d, e, shift, o1, e1, o2, e2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
