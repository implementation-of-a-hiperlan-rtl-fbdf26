// Testbench for montium_regfile: random writes against a model array; checks that a
// write is not visible before the clock edge (no bypass) and is afterwards.
module tb_montium_regfile;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, we = 0;
  logic [1:0] wsel = 0, rsel = 0;
  logic [15:0] wdata = 0, rdata;
  logic [15:0] model [4];

  montium_regfile dut (.clk, .rst_n, .we, .wsel, .wdata, .rsel, .rdata);
  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) model[i] = 0;
    @(negedge clk); rst_n = 1;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      we = 1'($urandom); wsel = 2'($urandom); wdata = 16'($urandom);
      rsel = wsel;
      #1;
      checks++;
      if (rdata != model[rsel]) begin failures++; $display("bypass/old value wrong at %0d", i); end
      @(posedge clk);
      if (we) model[wsel] = wdata;
      #1;
      rsel = 2'($urandom);
      #1;
      checks++;
      if (rdata != model[rsel]) begin failures++; $display("read mismatch at %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
