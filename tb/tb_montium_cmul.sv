// Testbench for montium_cmul: random complex operands and shifts; the product after
// the load edge is compared with a reference in 64-bit integers.
module tb_montium_cmul;
  import hl2_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, load = 0;
  cplx_t x, y, p;
  logic [4:0] shift;

  montium_cmul dut (.clk, .rst_n, .load, .x, .y, .shift, .p);
  always #5 clk = ~clk;

  function automatic longint rs(input longint v, input int sh);
    longint r;
    r = (sh == 0) ? v : ((v + (64'sd1 <<< (sh - 1))) >>> sh);
    if (r > 32767) r = 32767;
    if (r < -32768) r = -32768;
    return r;
  endfunction

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint er, ei;
    cplx_t xs, ys;
    x = '0; y = '0; shift = 15;
    @(negedge clk); rst_n = 1;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      x = 32'($urandom); y = 32'($urandom); load = 1; xs = x; ys = y;
      shift = 5'($urandom_range(12, 17));
      @(negedge clk);
      load = 0; x = 32'($urandom); y = 32'($urandom);   // no effect without load
      #1;
      er = rs(longint'(xs.re) * ys.re - longint'(xs.im) * ys.im, int'(shift));
      ei = rs(longint'(xs.re) * ys.im + longint'(xs.im) * ys.re, int'(shift));
      checks++;
      if (longint'(p.re) != er || longint'(p.im) != ei) begin
        failures++;
        if (failures < 10) $display("got %0d,%0d want %0d,%0d", p.re, p.im, er, ei);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
