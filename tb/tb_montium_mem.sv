// Testbench for montium_mem: fills all 512 words, then random simultaneous reads and
// writes against a model array; checks the one-cycle read latency.
module tb_montium_mem;
  int checks = 0, failures = 0;
  logic clk = 0, we = 0;
  logic [8:0] waddr = 0, raddr = 0;
  logic [15:0] wdata = 0, rdata;
  logic [15:0] model [512];

  montium_mem dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);
  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [8:0] ra;
    for (int i = 0; i < 512; i++) begin
      @(negedge clk); we = 1; waddr = 9'(i); wdata = 16'($urandom); model[i] = wdata;
    end
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      we = 1'($urandom); waddr = 9'($urandom); wdata = 16'($urandom);
      raddr = 9'($urandom); ra = raddr;
      if (i % 7 == 0) raddr = waddr;  // read of the word being written returns the old word
      ra = raddr;
      @(posedge clk);
      #1;
      checks++;
      if (rdata != model[ra]) begin
        failures++;
        if (failures < 10) $display("addr %0d: got %h want %h", ra, rdata, model[ra]);
      end
      if (we) model[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
