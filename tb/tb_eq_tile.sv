// Testbench for eq_tile. Builds symbols of 48 random data points and 4 pilots,
// passes them through a random per-subcarrier channel gain and a random common phase
// per symbol, quantizes them to Q1.15, and loads the ideal equalizer coefficients,
// the pilot value list, de-map table and parameters through the configuration port.
// The de-mapped words must equal the transmitted bits: 16-QAM first, then QPSK, 64-QAM
// and BPSK, each after swapping table and parameters (the modulation switch). The first symbol is sent
// with eq_enable low and must produce no output (preamble drop). Checks the 110-cycle
// execution of every symbol.
module tb_eq_tile;
  import hl2_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, frame_start = 0, eq_enable = 0;
  logic cfg_valid = 0, cfg_hdr = 0;
  logic [15:0] cfg_data = 0, out_data;
  logic in_valid = 0, in_ready, out_valid, out_ready = 1, exec_busy;
  cplx_t in_data = '0;

  eq_tile dut (.clk, .rst_n, .frame_start, .eq_enable, .cfg_valid, .cfg_hdr, .cfg_data,
               .in_valid, .in_ready, .in_data, .out_valid, .out_ready, .out_data, .exec_busy);
  always #5 clk = ~clk;

  localparam real PI = 3.14159265358979;
  real h_re [52], h_im [52];
  int  pd [16];
  int  exec_len = 0, n_exec = 0, outputs = 0, stalls = 0;
  int  exp_q [$];

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (exec_busy) exec_len++;
    else if (exec_len != 0) begin
      checks++; n_exec++;
      if (exec_len != 110) begin failures++; $display("execution took %0d cycles", exec_len); end
      exec_len = 0;
    end
    out_ready <= 1'($urandom_range(0, 4) != 0);
    if (out_valid && !out_ready) stalls++;
    if (out_valid && out_ready) begin
      outputs++;
      checks++;
      if (exp_q.size() == 0 || int'(out_data) != exp_q[0]) begin
        failures++;
        if (failures < 10) $display("demapped %0d, expected %0d", out_data, (exp_q.size() != 0) ? exp_q[0] : -1);
      end
      if (exp_q.size() != 0) void'(exp_q.pop_front());
    end
  end

  task automatic cfg_word(input logic hdr, input logic [15:0] w);
    @(negedge clk); cfg_valid = 1; cfg_hdr = hdr; cfg_data = w;
    @(negedge clk); cfg_valid = 0; cfg_hdr = 0;
  endtask
  task automatic cfg_hdr_to(input int m, input int a);
    cfg_word(1, 16'((m << 9) | a));
  endtask

  // 16-QAM level for two bits (b0 b1): 00 -3, 01 -1, 11 +1, 10 +3
  function automatic real qam16_level(input int b2);
    case (b2)
      0: return -3.0; 1: return -1.0; 3: return 1.0; default: return 3.0;
    endcase
  endfunction
  function automatic int qam16_bits(input real v);
    real t = 2.0 / $sqrt(10.0);
    if (v < -t) return 0; else if (v < 0.0) return 1; else if (v < t) return 3; else return 2;
  endfunction

  // 64-QAM level for three bits (Gray): 000 -7, 001 -5, 011 -3, 010 -1, 110 +1, 111 +3,
  // 101 +5, 100 +7
  function automatic real qam64_level(input int b3);
    case (b3)
      0: return -7.0; 1: return -5.0; 3: return -3.0; 2: return -1.0;
      6: return 1.0;  7: return 3.0;  5: return 5.0;  default: return 7.0;
    endcase
  endfunction
  function automatic int qam64_bits(input real v);
    real t = 2.0 / $sqrt(42.0);
    if (v < -3.0 * t) return 0; else if (v < -2.0 * t) return 1; else if (v < -t) return 3;
    else if (v < 0.0) return 2; else if (v < t) return 6; else if (v < 2.0 * t) return 7;
    else if (v < 3.0 * t) return 5; else return 4;
  endfunction

  // mode 0: 16-QAM (shift 11, offset 8, max 15, 4 bits); mode 1: QPSK (14, 1, 1, 1);
  // mode 2: 64-QAM (11, 8, 15, 4) with 3 bits per axis; mode 3: BPSK (14, 1, 1, 1)
  task automatic load_demap(input int mode);
    int sh, off, mx, bits, w;
    real vr, vi;
    if (mode == 0 || mode == 2) begin sh = 11; off = 8; mx = 15; bits = 4; end
    else begin sh = 14; off = 1; mx = 1; bits = 1; end
    cfg_hdr_to(4, 0);
    cfg_word(0, 16'(sh)); cfg_word(0, 16'(off)); cfg_word(0, 16'(mx)); cfg_word(0, 16'(bits));
    cfg_hdr_to(3, 0);
    for (int pr = 0; pr <= mx; pr++)
      for (int pi = 0; pi <= mx; pi++) begin
        vr = (pr - off + 0.5) * (2.0 ** sh) / 16384.0;
        vi = (pi - off + 0.5) * (2.0 ** sh) / 16384.0;
        case (mode)
          0:       w = (qam16_bits(vr) << 2) | qam16_bits(vi);
          1:       w = ((vr > 0.0) ? 2 : 0) | ((vi > 0.0) ? 1 : 0);
          2:       w = (qam64_bits(vr) << 3) | qam64_bits(vi);
          default: w = (vr > 0.0) ? 1 : 0;
        endcase
        cfg_hdr_to(3, (pr << bits) | pi);
        cfg_word(0, 16'(w));
      end
  endtask

  task automatic send_symbol(input int mode, input int sidx, input bit expect_out);
    real xr, xi, yr, yi, ph, g;
    int d, bits, pk;
    g  = 0.02;
    ph = 2.0 * PI * $urandom_range(0, 999) / 1000.0;
    d  = 0; pk = 0;
    for (int p = 0; p < 52; p++) begin
      if (is_pilot_pos(6'(p))) begin
        xr = ((pk == 3) ? -1.0 : 1.0) * pd[sidx];
        xi = 0.0;
        pk++;
      end else begin
        if (mode == 0) begin
          bits = $urandom_range(0, 15);
          xr = qam16_level(bits >> 2) / $sqrt(10.0);
          xi = qam16_level(bits & 3) / $sqrt(10.0);
        end else if (mode == 1) begin
          bits = $urandom_range(0, 3);
          xr = ((bits & 2) != 0 ? 1.0 : -1.0) / $sqrt(2.0);
          xi = ((bits & 1) != 0 ? 1.0 : -1.0) / $sqrt(2.0);
        end else if (mode == 2) begin
          bits = $urandom_range(0, 63);
          xr = qam64_level(bits >> 3) / $sqrt(42.0);
          xi = qam64_level(bits & 7) / $sqrt(42.0);
        end else begin
          bits = $urandom_range(0, 1);
          xr = (bits != 0) ? 1.0 : -1.0;
          xi = 0.0;
        end
        if (expect_out) exp_q.push_back(bits);
        d++;
      end
      // y = x * h * g * exp(j*ph)
      yr = g * (xr * h_re[p] - xi * h_im[p]);
      yi = g * (xr * h_im[p] + xi * h_re[p]);
      @(negedge clk);
      in_valid = 1;
      in_data.re = 16'($rtoi($floor(32768.0 * (yr * $cos(ph) - yi * $sin(ph)) + 0.5)));
      in_data.im = 16'($rtoi($floor(32768.0 * (yr * $sin(ph) + yi * $cos(ph)) + 0.5)));
      do @(posedge clk); while (!in_ready);
    end
    @(negedge clk); in_valid = 0;
  endtask

  initial begin
    real mag, ang, cr, ci;
    @(negedge clk); rst_n = 1;
    // channel and ideal coefficients 1/(h*g) in Q8.8
    for (int p = 0; p < 52; p++) begin
      mag = 0.6 + 0.8 * $urandom_range(0, 1000) / 1000.0;
      ang = 2.0 * PI * $urandom_range(0, 1000) / 1000.0;
      h_re[p] = mag * $cos(ang); h_im[p] = mag * $sin(ang);
    end
    cfg_hdr_to(0, 0);
    for (int p = 0; p < 52; p++) begin
      cr = h_re[p] / (0.02 * (h_re[p] ** 2 + h_im[p] ** 2));
      cfg_word(0, 16'($rtoi($floor(cr * 256.0 + 0.5))));
    end
    cfg_hdr_to(1, 0);
    for (int p = 0; p < 52; p++) begin
      ci = -h_im[p] / (0.02 * (h_re[p] ** 2 + h_im[p] ** 2));
      cfg_word(0, 16'($rtoi($floor(ci * 256.0 + 0.5))));
    end
    cfg_hdr_to(2, 0);
    for (int i = 0; i < 16; i++) begin
      pd[i] = ($urandom_range(0, 1) == 1) ? 1 : -1;
      cfg_word(0, 16'(pd[i] * 16384));
    end
    load_demap(0);
    @(negedge clk); frame_start = 1; @(negedge clk); frame_start = 0;
    send_symbol(0, 0, 0);                  // dropped: eq_enable low
    repeat (300) @(negedge clk);
    checks++;
    if (outputs != 0 || n_exec != 0) begin failures++; $display("dropped symbol produced output"); end
    eq_enable = 1;
    for (int s = 0; s < 4; s++) send_symbol(0, s, 1);
    wait (exp_q.size() == 0);
    repeat (20) @(negedge clk);
    load_demap(1);                         // modulation switch to QPSK
    for (int s = 4; s < 7; s++) send_symbol(1, s, 1);
    wait (exp_q.size() == 0);
    repeat (20) @(negedge clk);
    load_demap(2);                         // 64-QAM
    for (int s = 7; s < 10; s++) send_symbol(2, s, 1);
    wait (exp_q.size() == 0);
    repeat (20) @(negedge clk);
    load_demap(3);                         // BPSK
    for (int s = 10; s < 13; s++) send_symbol(3, s, 1);
    wait (exp_q.size() == 0);
    repeat (20) @(negedge clk);
    checks++;
    if (outputs != 13 * 48 || n_exec != 13 || stalls == 0) begin
      failures++;
      $display("outputs %0d executions %0d stalls %0d", outputs, n_exec, stalls);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
