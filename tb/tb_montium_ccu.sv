// Testbench for montium_ccu: packets of a header and random data words, with idle
// cycles in between; checks every write (memory, address, data) and that headers and
// idle cycles write nothing.
module tb_montium_ccu;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, cfg_valid = 0, cfg_hdr = 0;
  logic [15:0] cfg_data = 0, wr_data;
  logic wr_en;
  logic [3:0] wr_mem;
  logic [8:0] wr_addr;

  montium_ccu dut (.clk, .rst_n, .cfg_valid, .cfg_hdr, .cfg_data, .wr_en, .wr_mem, .wr_addr, .wr_data);
  always #5 clk = ~clk;

  logic        exp_en;
  logic [3:0]  exp_mem;
  logic [8:0]  exp_addr;
  logic [15:0] exp_data;

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference: the header selects memory and address, each data word writes there.
  logic [3:0] m_sel = 0;
  logic [8:0] m_addr = 0;
  always @(posedge clk) if (rst_n) begin
    exp_en = cfg_valid && !cfg_hdr;
    exp_mem = m_sel; exp_addr = m_addr; exp_data = cfg_data;
    if (cfg_valid && cfg_hdr) begin m_sel = cfg_data[12:9]; m_addr = cfg_data[8:0]; end
    else if (cfg_valid) m_addr = m_addr + 1;
    #1;
    checks++;
    if (wr_en != exp_en || (exp_en && (wr_mem != exp_mem || wr_addr != exp_addr || wr_data != exp_data))) begin
      failures++;
      if (failures < 10) $display("write mismatch: en %b/%b mem %0d/%0d addr %0d/%0d", wr_en, exp_en,
                                  wr_mem, exp_mem, wr_addr, exp_addr);
    end
  end

  initial begin
    int m, a, n;
    @(negedge clk); rst_n = 1;
    for (int p = 0; p < 30; p++) begin
      m = $urandom_range(0, 15); a = $urandom_range(0, 511); n = $urandom_range(1, 20);
      @(negedge clk);
      cfg_valid = 1; cfg_hdr = 1; cfg_data = 16'({3'b000, 4'(m), 9'(a)});
      for (int k = 0; k < n; k++) begin
        @(negedge clk);
        cfg_hdr = 0; cfg_valid = 1'($urandom_range(0, 3) != 0); cfg_data = 16'($urandom);
      end
      @(negedge clk); cfg_valid = 0;
    end
    @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
