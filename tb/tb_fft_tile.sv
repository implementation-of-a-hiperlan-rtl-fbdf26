// Testbench for fft_tile: random 64-sample symbols (plus one single-tone symbol) are
// transformed; the 52 outputs (subcarriers -26..-1, +1..+26) are compared with a
// direct DFT divided by 64, worked out here in floating point (tolerance 6 LSB).
// Also checks the 204-cycle execution and output stalls.
module tb_fft_tile;
  import hl2_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0, exec_busy;
  cplx_t in_data = '0, out_data;

  fft_tile dut (.clk, .rst_n, .in_valid, .in_ready, .in_data, .out_valid, .out_ready, .out_data, .exec_busy);
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
      if (exec_len != 204) begin failures++; $display("execution took %0d cycles", exec_len); end
      exec_len = 0;
    end
    if (out_valid && !out_ready) stalls++;
  end

  task automatic run_symbol(input int kind);
    cplx_t x [64];
    real er, ei, th;
    int k;
    cplx_t got;
    logic fire;
    for (int n = 0; n < 64; n++) begin
      if (kind == 0) begin
        x[n].re = 16'($urandom_range(0, 30000) - 15000);
        x[n].im = 16'($urandom_range(0, 30000) - 15000);
      end else begin
        x[n].re = 16'($rtoi(20000.0 * $cos(2.0 * PI * 5 * n / 64.0)));
        x[n].im = 16'($rtoi(20000.0 * $sin(2.0 * PI * 5 * n / 64.0)));
      end
    end
    for (int n = 0; n < 64; n++) begin
      @(negedge clk); in_valid = 1; in_data = x[n];
      do @(posedge clk); while (!in_ready);
    end
    @(negedge clk); in_valid = 0;
    for (int p = 0; p < 52; p++) begin
      do begin
        @(negedge clk); out_ready = 1'($urandom_range(0, 2) != 0);
        #1 got = out_data; fire = out_valid && out_ready;
        @(posedge clk);
      end while (!fire);
      k = (p < 26) ? p - 26 : p - 25;
      er = 0.0; ei = 0.0;
      for (int n = 0; n < 64; n++) begin
        th = -2.0 * PI * k * n / 64.0;
        er += x[n].re * $cos(th) - x[n].im * $sin(th);
        ei += x[n].re * $sin(th) + x[n].im * $cos(th);
      end
      er /= 64.0; ei /= 64.0;
      checks++;
      if (absr(got.re - er) > 6.0 || absr(got.im - ei) > 6.0) begin
        failures++;
        if (failures < 10) $display("k=%0d got %0d,%0d want %f,%f", k, got.re, got.im, er, ei);
      end
    end
    @(negedge clk); out_ready = 0;
  endtask

  initial begin
    @(negedge clk); rst_n = 1;
    run_symbol(1);
    for (int s = 0; s < 4; s++) run_symbol(0);
    checks++;
    if (stalls == 0) begin failures++; $display("no output stall happened"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
