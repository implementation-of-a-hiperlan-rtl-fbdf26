// Testbench for fo_tile: loads the cosine/sine tables and a phase step through the
// configuration port, sends random symbols with different steps, and compares every
// output with x[n] * exp(j*2*pi*k/512), k = top 9 bits of (n*step mod 2^16), worked out
// here in floating point (tolerance 2 LSB). Also checks the 67-cycle execution and
// that output stalls lose nothing.
module tb_fo_tile;
  import hl2_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic cfg_valid = 0, cfg_hdr = 0;
  logic [15:0] cfg_data = 0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0, exec_busy;
  cplx_t in_data = '0, out_data;

  fo_tile dut (.clk, .rst_n, .cfg_valid, .cfg_hdr, .cfg_data, .in_valid, .in_ready, .in_data,
               .out_valid, .out_ready, .out_data, .exec_busy);
  always #5 clk = ~clk;

  localparam real PI = 3.14159265358979;
  function automatic real absr(input real v); return (v < 0.0) ? -v : v; endfunction
  int exec_len = 0, stalls = 0;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (exec_busy) exec_len++;
    else if (exec_len != 0) begin
      checks++;
      if (exec_len != 67) begin failures++; $display("execution took %0d cycles", exec_len); end
      exec_len = 0;
    end
    if (out_valid && !out_ready) stalls++;
  end

  task automatic cfg_word(input logic hdr, input logic [15:0] w);
    @(negedge clk); cfg_valid = 1; cfg_hdr = hdr; cfg_data = w;
    @(negedge clk); cfg_valid = 0; cfg_hdr = 0;
  endtask

  task automatic run_symbol(input int step);
    cplx_t x [64];
    real th, er, ei;
    int k;
    cplx_t got;
    logic fire;
    cfg_word(1, 16'({4'd0, 3'd2, 9'd0}));
    cfg_word(0, 16'(step));
    for (int n = 0; n < 64; n++) begin
      x[n].re = 16'($urandom_range(0, 32000) - 16000);
      x[n].im = 16'($urandom_range(0, 32000) - 16000);
    end
    for (int n = 0; n < 64; n++) begin
      @(negedge clk); in_valid = 1; in_data = x[n];
      do @(posedge clk); while (!in_ready);
    end
    @(negedge clk); in_valid = 0;
    for (int n = 0; n < 64; n++) begin
      do begin
        @(negedge clk); out_ready = 1'($urandom_range(0, 2) != 0);
        #1 got = out_data; fire = out_valid && out_ready;
        @(posedge clk);
      end while (!fire);
      k  = ((n * step) % 65536) >> 7;
      th = 2.0 * PI * k / 512.0;
      er = (x[n].re * $cos(th) - x[n].im * $sin(th)) * 32767.0 / 32768.0;
      ei = (x[n].re * $sin(th) + x[n].im * $cos(th)) * 32767.0 / 32768.0;
      checks++;
      if (absr(got.re - er) > 2.0 || absr(got.im - ei) > 2.0) begin
        failures++;
        if (failures < 3) $display("step=%0d n=%0d got %0d,%0d want %f,%f", step, n, got.re, got.im, er, ei);
      end
    end
    @(negedge clk); out_ready = 0;
  endtask

  initial begin
    @(negedge clk); rst_n = 1;
    cfg_word(1, 16'({4'd0, 3'd0, 9'd0}));
    for (int i = 0; i < 512; i++) cfg_word(0, 16'($rtoi($floor(32767.0 * $cos(2.0 * PI * i / 512.0) + 0.5))));
    cfg_word(1, 16'({4'd0, 3'd1, 9'd0}));
    for (int i = 0; i < 512; i++) cfg_word(0, 16'($rtoi($floor(32767.0 * $sin(2.0 * PI * i / 512.0) + 0.5))));
    run_symbol(0);
    run_symbol(300);
    run_symbol(65536 - 517);
    run_symbol(1021);
    checks++;
    if (stalls == 0) begin failures++; $display("no output stall happened"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
