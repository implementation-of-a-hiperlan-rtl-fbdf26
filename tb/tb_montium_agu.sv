// Testbench for montium_agu: random base/stride, checks the address sequence
// base + k*stride modulo 512 and that the address holds without step.
module tb_montium_agu;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0, step = 0;
  logic [8:0] base = 0, stride = 0, addr;

  montium_agu dut (.clk, .rst_n, .start, .base, .stride, .step, .addr);
  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_a, b, s;
    @(negedge clk); rst_n = 1;
    for (int r = 0; r < 20; r++) begin
      @(negedge clk);
      b = $urandom_range(0, 511); s = $urandom_range(0, 511);
      start = 1; base = 9'(b); stride = 9'(s);
      @(negedge clk); start = 0;
      exp_a = b;
      for (int k = 0; k < 40; k++) begin
        checks++;
        if (int'(addr) != exp_a) begin failures++; $display("addr %0d want %0d", addr, exp_a); end
        step = 1'($urandom);
        @(negedge clk);
        if (step) exp_a = (exp_a + s) % 512;
        step = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
