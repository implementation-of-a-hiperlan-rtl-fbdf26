// End-to-end testbench for hl2_receiver at its default sizes.
//
// A transmitter model builds a downlink MAC frame: the preamble C section (32-sample
// prefix and two copies of the 64-sample C sequence) and NDATA_SYM data OFDM symbols
// (48 data subcarriers, pilots +1,+1,+1,-1 times the pilot polarity sequence, 16-sample
// prefix), 16-QAM for the first symbols and QPSK for the rest. A channel model applies
// two-path multipath, a frequency offset, a phase offset and a little noise. A host
// model plays the general-purpose processor: it estimates the frequency offset from
// the preamble, loads tile 1, reads the FFT of the second preamble symbol from
// fft_tap, computes the 52 equalizer coefficients by complex division, loads tile 3,
// and raises eq_enable. The receiver's de-mapped words must equal the transmitted bits.
// Random output stalls push back through all tiles. Counted mechanisms (each must
// occur): prefix drops, frequency rotation, preamble drops in tile 3, non-trivial
// phase offset coefficients, modulation switch, tile-to-tile stalls. Execution times
// of 67, 204 and 110 cycles are checked for every symbol.
module tb_hl2_receiver;
  import hl2_pkg::*;
  localparam int NDATA_SYM = 12;
  localparam int NQAM_SYM  = 8;      // first 8 data symbols 16-QAM, then QPSK
  localparam real PI = 3.14159265358979;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, frame_start = 0, eq_enable = 0;
  logic s_valid = 0, s_ready;
  cplx_t s_data = '0;
  logic cfg_valid = 0, cfg_hdr = 0;
  logic [1:0] cfg_tile = 0;
  logic [15:0] cfg_data = 0, m_data;
  logic fft_tap_valid, m_valid, m_ready = 1, prefix_dropping;
  cplx_t fft_tap_data;
  logic [2:0] exec_busy;

  hl2_receiver dut (.clk, .rst_n, .frame_start, .eq_enable, .s_valid, .s_ready, .s_data,
                    .cfg_valid, .cfg_tile, .cfg_hdr, .cfg_data, .fft_tap_valid, .fft_tap_data,
                    .m_valid, .m_ready, .m_data, .exec_busy, .prefix_dropping);
  always #5 clk = ~clk;

  // ---- frame content ----
  localparam int NSAMP = 160 + NDATA_SYM * 80;
  real tx_re [NSAMP], tx_im [NSAMP], rx_re [NSAMP], rx_im [NSAMP];
  real cseq [52];
  int  pd [NDATA_SYM];
  int  exp_q [$];
  cplx_t tap [$];

  // C sequence on subcarriers -26..26 (without 0)
  localparam int CSEQ [52] = '{1,1,-1,-1,1,1,-1,1,-1,1,1,1,1,1,1,-1,-1,1,1,-1,1,-1,1,1,1,1,
                               1,-1,-1,1,1,-1,1,-1,1,-1,-1,-1,-1,-1,1,1,-1,-1,1,-1,1,-1,1,1,1,1};

  function automatic real noise();
    int v;
    v = $urandom_range(0, 20);
    return (v - 10) / 32768.0;
  endfunction
  function automatic int sc_of(input int p); return (p < 26) ? p - 26 : p - 25; endfunction
  function automatic real qam16_level(input int b2);
    case (b2) 0: return -3.0; 1: return -1.0; 3: return 1.0; default: return 3.0; endcase
  endfunction
  function automatic int qam16_bits(input real v);
    real t = 2.0 / $sqrt(10.0);
    if (v < -t) return 0; else if (v < 0.0) return 1; else if (v < t) return 3; else return 2;
  endfunction

  // time samples of one 64-sample OFDM symbol from 52 subcarrier values, scale g
  task automatic ofdm(input real xr [52], input real xi [52], output real tr [64], output real ti [64]);
    real g = 0.018, th;
    for (int n = 0; n < 64; n++) begin
      tr[n] = 0.0; ti[n] = 0.0;
      for (int p = 0; p < 52; p++) begin
        th = 2.0 * PI * sc_of(p) * n / 64.0;
        tr[n] += g * (xr[p] * $cos(th) - xi[p] * $sin(th));
        ti[n] += g * (xr[p] * $sin(th) + xi[p] * $cos(th));
      end
    end
  endtask

  // ---- counters ----
  int exec_len [3] = '{0, 0, 0};
  int exec_cnt [3] = '{0, 0, 0};
  localparam int EXEC_EXP [3] = '{67, 204, 110};
  int n_prefix_drop = 0, n_rotated = 0, n_tile3_drop = 0, n_phase_corr = 0, n_switch = 0, n_stall = 0;
  int outputs = 0, bit_errors = 0;

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    for (int t = 0; t < 3; t++) begin
      if (exec_busy[t]) exec_len[t]++;
      else if (exec_len[t] != 0) begin
        checks++; exec_cnt[t]++;
        if (exec_len[t] != EXEC_EXP[t]) begin
          failures++; $display("tile %0d executed %0d cycles", t + 1, exec_len[t]);
        end
        exec_len[t] = 0;
      end
    end
    if (s_valid && s_ready && prefix_dropping) n_prefix_drop++;
    if (dut.u_tile1.issue && dut.u_tile1.phase != 16'd0) n_rotated++;
    if (dut.u_tile3.state == 2'd0 && dut.u_tile3.in_valid && dut.u_tile3.in_ready
        && dut.u_tile3.cnt == 7'd51 && !eq_enable) n_tile3_drop++;
    if (dut.u_tile3.exec_busy && dut.u_tile3.cnt == 7'd60
        && (dut.u_tile3.c_po.im > 16'sd300 || dut.u_tile3.c_po.im < -16'sd300)) n_phase_corr++;
    if ((dut.u_tile1.out_valid && !dut.u_tile1.out_ready) || (dut.u_tile2.out_valid && !dut.u_tile2.out_ready))
      n_stall++;
    if (fft_tap_valid) tap.push_back(fft_tap_data);
    m_ready <= 1'($urandom_range(0, 5) != 0);
    if (m_valid && m_ready) begin
      outputs++;
      checks++;
      if (exp_q.size() == 0 || int'(m_data) != exp_q[0]) begin
        failures++; bit_errors++;
        if (bit_errors < 10) $display("output %0d: got %0d want %0d", outputs, m_data, (exp_q.size() != 0) ? exp_q[0] : -1);
      end
      if (exp_q.size() != 0) void'(exp_q.pop_front());
    end
  end

  task automatic cfg_word(input int tile, input logic hdr, input logic [15:0] w);
    @(negedge clk); cfg_valid = 1; cfg_tile = 2'(tile); cfg_hdr = hdr; cfg_data = w;
    @(negedge clk); cfg_valid = 0; cfg_hdr = 0;
  endtask
  task automatic cfg_to(input int tile, input int m, input int a);
    cfg_word(tile, 1, 16'((m << 9) | a));
  endtask

  task automatic load_demap(input int mode);
    int sh, off, mx, bits, w;
    real vr, vi;
    if (mode == 0) begin sh = 11; off = 8; mx = 15; bits = 4; end
    else begin sh = 14; off = 1; mx = 1; bits = 1; end
    cfg_to(3, 4, 0);
    cfg_word(3, 0, 16'(sh)); cfg_word(3, 0, 16'(off)); cfg_word(3, 0, 16'(mx)); cfg_word(3, 0, 16'(bits));
    for (int pr = 0; pr <= mx; pr++) begin
      cfg_to(3, 3, pr << bits);
      for (int pi = 0; pi <= mx; pi++) begin
        vr = (pr - off + 0.5) * (2.0 ** sh) / 16384.0;
        vi = (pi - off + 0.5) * (2.0 ** sh) / 16384.0;
        if (mode == 0) w = (qam16_bits(vr) << 2) | qam16_bits(vi);
        else w = ((vr > 0.0) ? 2 : 0) | ((vi > 0.0) ? 1 : 0);
        cfg_word(3, 0, 16'(w));
      end
    end
  endtask

  task automatic feed(input int from, input int to);
    for (int n = from; n < to; n++) begin
      @(negedge clk);
      s_valid = 1;
      s_data.re = 16'($rtoi($floor(32768.0 * rx_re[n] + 0.5)));
      s_data.im = 16'($rtoi($floor(32768.0 * rx_im[n] + 0.5)));
      do @(posedge clk); while (!s_ready);
    end
    @(negedge clk); s_valid = 0;
  endtask

  initial begin
    real xr [52], xi [52], tr [64], ti [64];
    real fo, phi0, a1r, a1i, cr, ci, est, yr, yi, den;
    int bits, lfsr, b, step, sidx;
    int sym_bits [NDATA_SYM][48];

    // ---- transmitter: preamble C ----
    for (int p = 0; p < 52; p++) begin xr[p] = CSEQ[p]; xi[p] = 0.0; end
    ofdm(xr, xi, tr, ti);
    for (int n = 0; n < 32; n++) begin tx_re[n] = tr[32 + n]; tx_im[n] = ti[32 + n]; end
    for (int n = 0; n < 128; n++) begin tx_re[32 + n] = tr[n % 64]; tx_im[32 + n] = ti[n % 64]; end
    // pilot polarity: x^7 + x^4 + 1 scrambler, all ones seed
    lfsr = 7'h7f;
    for (int i = 0; i < NDATA_SYM; i++) begin
      b = ((lfsr >> 6) ^ (lfsr >> 3)) & 1;
      lfsr = ((lfsr << 1) | b) & 7'h7f;
      pd[i] = b ? -1 : 1;
    end
    // ---- transmitter: data symbols ----
    for (int s = 0; s < NDATA_SYM; s++) begin
      int d, pk;
      d = 0; pk = 0;
      for (int p = 0; p < 52; p++) begin
        if (is_pilot_pos(6'(p))) begin
          xr[p] = ((pk == 3) ? -1.0 : 1.0) * pd[s]; xi[p] = 0.0; pk++;
        end else begin
          if (s < NQAM_SYM) begin
            bits = $urandom_range(0, 15);
            xr[p] = qam16_level(bits >> 2) / $sqrt(10.0); xi[p] = qam16_level(bits & 3) / $sqrt(10.0);
          end else begin
            bits = $urandom_range(0, 3);
            xr[p] = ((bits & 2) != 0 ? 1.0 : -1.0) / $sqrt(2.0);
            xi[p] = ((bits & 1) != 0 ? 1.0 : -1.0) / $sqrt(2.0);
          end
          sym_bits[s][d] = bits; d++;
        end
      end
      ofdm(xr, xi, tr, ti);
      for (int n = 0; n < 80; n++) begin
        tx_re[160 + s * 80 + n] = tr[(n + 48) % 64];
        tx_im[160 + s * 80 + n] = ti[(n + 48) % 64];
      end
    end
    // ---- channel: two paths, frequency offset, phase offset, noise ----
    fo   = 2.0 * PI * 0.0019;            // rad per sample, about 38 kHz at 20 MHz
    phi0 = 0.7;
    a1r  = 0.25; a1i = -0.2;             // second path, 3 samples late
    for (int n = 0; n < NSAMP; n++) begin
      yr = 0.85 * tx_re[n] + ((n >= 3) ? a1r * tx_re[n - 3] - a1i * tx_im[n - 3] : 0.0);
      yi = 0.85 * tx_im[n] + ((n >= 3) ? a1r * tx_im[n - 3] + a1i * tx_re[n - 3] : 0.0);
      rx_re[n] = yr * $cos(fo * n + phi0) - yi * $sin(fo * n + phi0) + noise();
      rx_im[n] = yr * $sin(fo * n + phi0) + yi * $cos(fo * n + phi0) + noise();
    end

    @(negedge clk); rst_n = 1;
    // ---- host: tables, frequency offset estimate from preamble C ----
    cfg_to(1, 0, 0);
    for (int i = 0; i < 512; i++) cfg_word(1, 0, 16'($rtoi($floor(32767.0 * $cos(2.0 * PI * i / 512.0) + 0.5))));
    cfg_to(1, 1, 0);
    for (int i = 0; i < 512; i++) cfg_word(1, 0, 16'($rtoi($floor(32767.0 * $sin(2.0 * PI * i / 512.0) + 0.5))));
    cr = 0.0; ci = 0.0;
    for (int n = 0; n < 16; n++) begin   // r[n+64] * conj(r[n]) over the first 16 samples of the two copies
      cr += rx_re[96 + n] * rx_re[32 + n] + rx_im[96 + n] * rx_im[32 + n];
      ci += rx_im[96 + n] * rx_re[32 + n] - rx_re[96 + n] * rx_im[32 + n];
    end
    est  = $atan2(ci, cr) / 64.0;
    step = $rtoi($floor(-est * 65536.0 / (2.0 * PI) + 0.5));
    cfg_to(1, 2, 0);
    cfg_word(1, 0, 16'(step));
    cfg_to(3, 2, 0);
    for (int i = 0; i < NDATA_SYM; i++) cfg_word(3, 0, 16'(pd[i] * 16384));
    load_demap(0);
    // ---- preamble through tiles 1 and 2 ----
    @(negedge clk); frame_start = 1; @(negedge clk); frame_start = 0;
    feed(0, 160);
    wait (tap.size() == 104);
    // ---- host: equalizer coefficients from the second preamble symbol ----
    cfg_to(3, 0, 0);
    for (int p = 0; p < 52; p++) begin
      yr = tap[52 + p].re / 32768.0; yi = tap[52 + p].im / 32768.0; den = yr * yr + yi * yi;
      cfg_word(3, 0, 16'($rtoi($floor(CSEQ[p] * yr / den * 256.0 + 0.5))));
    end
    cfg_to(3, 1, 0);
    for (int p = 0; p < 52; p++) begin
      yr = tap[52 + p].re / 32768.0; yi = tap[52 + p].im / 32768.0; den = yr * yr + yi * yi;
      cfg_word(3, 0, 16'($rtoi($floor(-CSEQ[p] * yi / den * 256.0 + 0.5))));
    end
    eq_enable = 1;
    // ---- data: 16-QAM symbols, then switch to QPSK ----
    for (int s = 0; s < NQAM_SYM; s++) for (int d = 0; d < 48; d++) exp_q.push_back(sym_bits[s][d]);
    feed(160, 160 + NQAM_SYM * 80);
    wait (exp_q.size() == 0);
    repeat (10) @(negedge clk);
    load_demap(1);
    n_switch++;
    for (int s = NQAM_SYM; s < NDATA_SYM; s++) for (int d = 0; d < 48; d++) exp_q.push_back(sym_bits[s][d]);
    feed(160 + NQAM_SYM * 80, NSAMP);
    wait (exp_q.size() == 0);
    repeat (400) @(negedge clk);

    checks++;
    if (outputs != NDATA_SYM * 48) begin failures++; $display("%0d outputs", outputs); end
    checks++;
    if (exec_cnt[0] != NDATA_SYM + 2 || exec_cnt[1] != NDATA_SYM + 2 || exec_cnt[2] != NDATA_SYM) begin
      failures++; $display("executions %0d %0d %0d", exec_cnt[0], exec_cnt[1], exec_cnt[2]);
    end
    $display("mechanisms: prefix drops %0d, rotated samples %0d, tile-3 preamble drops %0d, phase corrections %0d, modulation switches %0d, stall cycles %0d",
             n_prefix_drop, n_rotated, n_tile3_drop, n_phase_corr, n_switch, n_stall);
    checks++; if (n_prefix_drop != (NDATA_SYM + 2) * 16) failures++;
    checks++; if (n_rotated == 0) failures++;
    checks++; if (n_tile3_drop != 2) failures++;
    checks++; if (n_phase_corr == 0) failures++;
    checks++; if (n_switch == 0) failures++;
    checks++; if (n_stall == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
