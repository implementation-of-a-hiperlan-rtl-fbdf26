// Bit-error-rate sweep for hl2_receiver. It compares the 16-bit fixed-point receiver
// with a double-precision model of the same algorithm, as the reference evaluation does.
//
// Each point has its own Es/N0, channel, frequency offset and phase offset.
// - Es/N0: Es is the mean energy of a subcarrier symbol, N0 the complex noise variance.
// - Channel: either AWGN only, or an 18-tap Rayleigh delay line with an exponential
//   power profile of 1 or 5 samples RMS delay spread. These match the 50 and 250 ns
//   spreads of channel types A and E; the profile shape is this testbench's choice.
// For each point a downlink burst is sent: preamble C, then NSYM 16-QAM data symbols.
// Noise is Gaussian, made with Box-Muller from $urandom. The same quantized samples also
// go through a floating-point receiver in this testbench. It uses:
// - the same quantized frequency step and per-symbol restart of the rotation;
// - DFT/64, coefficients C/Y from the second preamble period, pilot coefficient Pd/S;
// - hard 16-QAM decisions.
// Checks per point:
//  - the RTL's bit errors match the model's within 10 %, plus 2 bits, plus 2 bits for
//    each decision that falls within 0.03 of a threshold;
//  - on the same channel, the error rate falls as Es/N0 rises.
// At the end, the highest point without multipath must have a BER below 1e-3.
// Tile 3's coefficients are Q8.8 (at most 128), and c = 1 / (G H). A subcarrier in a
// fade deeper than |H| < 1 / (128 G) therefore saturates its coefficient. Such points
// are reported but not compared, because the fixed-point receiver then loses more bits
// than the model at high Es/N0.
// The reference evaluation reports a difference under 0.5 % for 95,616-bit bursts. The
// 7,680-bit bursts here are too short to check that bound, so the tolerance is looser.
module tb_hl2_awgn;
  import hl2_pkg::*;
  localparam int  NSYM  = 40;
  localparam int  NPT   = 8;
  localparam int  NTAP  = 18;
  // per point: Es/N0 in dB and RMS delay spread in samples (0 = AWGN only)
  localparam real SNR_DB [NPT] = '{8.0, 12.0, 16.0, 24.0, 16.0, 30.0, 16.0, 30.0};
  localparam real TRMS   [NPT] = '{0.0, 0.0, 0.0, 0.0, 1.0, 1.0, 5.0, 5.0};
  // frequency offset in cycles per sample (0.005 is 100 kHz at 20 MHz) and phase offset
  localparam real FO     [NPT] = '{0.0012, -0.003, 0.005, -0.006, 0.0025, -0.0045, 0.0008, 0.006};
  localparam real PHI    [NPT] = '{-1.1, 0.4, 2.9, -2.2, 1.3, 0.0, -0.6, 2.0};
  localparam real PI = 3.14159265358979;
  localparam real G  = 0.032;   // I and Q each about 0.16 of full scale rms

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

  localparam int NSAMP = 160 + NSYM * 80;
  localparam int CSEQ [52] = '{1,1,-1,-1,1,1,-1,1,-1,1,1,1,1,1,1,-1,-1,1,1,-1,1,-1,1,1,1,1,
                               1,-1,-1,1,1,-1,1,-1,1,-1,-1,-1,-1,-1,1,1,-1,-1,1,-1,1,-1,1,1,1,1};
  real tx_re [NSAMP], tx_im [NSAMP];
  int  q_re [NSAMP], q_im [NSAMP];       // quantized received samples
  int  pd [NSYM];
  int  sent [$];                          // transmitted 4-bit words
  int  got [$];                           // RTL decisions
  cplx_t tap [$];

  function automatic int sc_of(input int p); return (p < 26) ? p - 26 : p - 25; endfunction
  function automatic real qam16_level(input int b2);
    case (b2) 0: return -3.0; 1: return -1.0; 3: return 1.0; default: return 3.0; endcase
  endfunction
  function automatic int qam16_bits(input real v);
    real t = 2.0 / $sqrt(10.0);
    if (v < -t) return 0; else if (v < 0.0) return 1; else if (v < t) return 3; else return 2;
  endfunction
  function automatic real gauss();
    int u1, u2;
    u1 = $urandom_range(1, 1000000); u2 = $urandom_range(0, 999999);
    return $sqrt(-2.0 * $ln(u1 / 1000000.0)) * $cos(2.0 * PI * u2 / 1000000.0);
  endfunction
  // Q8.8 coefficient, saturated as the host does in a deep fade; n_sat counts those
  int n_sat;
  function automatic logic [15:0] coef(input real c);
    int v = $rtoi($floor(c * 256.0 + 0.5));
    if (v > 32767 || v < -32768) n_sat++;
    return 16'((v > 32767) ? 32767 : (v < -32768) ? -32768 : v);
  endfunction
  function automatic int popc4(input int v); return $countones(4'(v)); endfunction

  task automatic ofdm(input real xr [52], input real xi [52], output real tr [64], output real ti [64]);
    real th;
    for (int n = 0; n < 64; n++) begin
      tr[n] = 0.0; ti[n] = 0.0;
      for (int p = 0; p < 52; p++) begin
        th = 2.0 * PI * sc_of(p) * n / 64.0;
        tr[n] += G * (xr[p] * $cos(th) - xi[p] * $sin(th));
        ti[n] += G * (xr[p] * $sin(th) + xi[p] * $cos(th));
      end
    end
  endtask

  // floating-point reference: rotate, DFT/64 of the 64-sample window starting at w0
  task automatic ref_fft(input int w0, input real est, output real yr [52], output real yi [52]);
    real rr, ri, th;
    for (int p = 0; p < 52; p++) begin yr[p] = 0.0; yi[p] = 0.0; end
    for (int n = 0; n < 64; n++) begin
      rr = (q_re[w0 + n] * $cos(-est * n) - q_im[w0 + n] * $sin(-est * n)) / 32768.0;
      ri = (q_re[w0 + n] * $sin(-est * n) + q_im[w0 + n] * $cos(-est * n)) / 32768.0;
      for (int p = 0; p < 52; p++) begin
        th = -2.0 * PI * sc_of(p) * n / 64.0;
        yr[p] += (rr * $cos(th) - ri * $sin(th)) / 64.0;
        yi[p] += (rr * $sin(th) + ri * $cos(th)) / 64.0;
      end
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (fft_tap_valid) tap.push_back(fft_tap_data);
    if (m_valid && m_ready) got.push_back(int'(m_data));
  end

  initial begin
    #200000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cfg_word(input int tile, input logic hdr, input logic [15:0] w);
    @(negedge clk); cfg_valid = 1; cfg_tile = 2'(tile); cfg_hdr = hdr; cfg_data = w;
    @(negedge clk); cfg_valid = 0; cfg_hdr = 0;
  endtask
  task automatic cfg_to(input int tile, input int m, input int a);
    cfg_word(tile, 1, 16'((m << 9) | a));
  endtask
  task automatic feed(input int from, input int to);
    for (int n = from; n < to; n++) begin
      @(negedge clk);
      s_valid = 1; s_data.re = 16'(q_re[n]); s_data.im = 16'(q_im[n]);
      do @(posedge clk); while (!s_ready);
    end
    @(negedge clk); s_valid = 0;
  endtask

  initial begin
    real xr [52], xi [52], tr [64], ti [64], yr [52], yi [52], cr_ [52], ci_ [52];
    real fo, phi0, snr, sigma, cr, ci, est, den, zr, zi, sr, si, cpr, cpi, vr, vi, v;
    int bits, lfsr, b, step, d, pk, err_ref, err_rtl, close, prev_ber_bits, awgn_top;
    int ref_words [$];
    real hr [NTAP], hi [NTAP], hp;

    @(negedge clk); rst_n = 1;
    cfg_to(1, 0, 0);
    for (int i = 0; i < 512; i++) cfg_word(1, 0, 16'($rtoi($floor(32767.0 * $cos(2.0 * PI * i / 512.0) + 0.5))));
    cfg_to(1, 1, 0);
    for (int i = 0; i < 512; i++) cfg_word(1, 0, 16'($rtoi($floor(32767.0 * $sin(2.0 * PI * i / 512.0) + 0.5))));
    // 16-QAM de-map table and parameters
    cfg_to(3, 4, 0);
    cfg_word(3, 0, 16'd11); cfg_word(3, 0, 16'd8); cfg_word(3, 0, 16'd15); cfg_word(3, 0, 16'd4);
    cfg_to(3, 3, 0);
    for (int pr = 0; pr < 16; pr++)
      for (int pi = 0; pi < 16; pi++)
        cfg_word(3, 0, 16'((qam16_bits((pr - 7.5) / 8.0) << 2) | qam16_bits((pi - 7.5) / 8.0)));
    lfsr = 'h7f;
    for (int i = 0; i < NSYM; i++) begin
      b = ((lfsr >> 6) ^ (lfsr >> 3)) & 1; lfsr = ((lfsr << 1) | b) & 'h7f; pd[i] = (b != 0) ? -1 : 1;
    end
    cfg_to(3, 2, 0);
    for (int i = 0; i < NSYM; i++) cfg_word(3, 0, 16'(pd[i] * 16384));
    prev_ber_bits = 1 << 30;

    for (int pt = 0; pt < NPT; pt++) begin
      sent.delete(); got.delete(); tap.delete(); ref_words.delete();
      // transmitter
      for (int p = 0; p < 52; p++) begin xr[p] = CSEQ[p]; xi[p] = 0.0; end
      ofdm(xr, xi, tr, ti);
      for (int n = 0; n < 32; n++) begin tx_re[n] = tr[32 + n]; tx_im[n] = ti[32 + n]; end
      for (int n = 0; n < 128; n++) begin tx_re[32 + n] = tr[n % 64]; tx_im[32 + n] = ti[n % 64]; end
      for (int s = 0; s < NSYM; s++) begin
        pk = 0;
        for (int p = 0; p < 52; p++) begin
          if (is_pilot_pos(6'(p))) begin
            xr[p] = ((pk == 3) ? -1.0 : 1.0) * pd[s]; xi[p] = 0.0; pk++;
          end else begin
            bits = $urandom_range(0, 15);
            xr[p] = qam16_level(bits >> 2) / $sqrt(10.0); xi[p] = qam16_level(bits & 3) / $sqrt(10.0);
            sent.push_back(bits);
          end
        end
        ofdm(xr, xi, tr, ti);
        for (int n = 0; n < 80; n++) begin
          tx_re[160 + s * 80 + n] = tr[(n + 48) % 64]; tx_im[160 + s * 80 + n] = ti[(n + 48) % 64];
        end
      end
      // channel: tapped delay line with an exponential power profile (AWGN only when
      // TRMS is 0), then frequency and phase offset, then AWGN with Es/N0 = 64 G^2 / sigma^2
      // one channel draw per delay spread, so that its Es/N0 points see the same channel
      if (pt == 0 || TRMS[pt] != TRMS[pt - 1]) begin
      hp = 0.0;
      for (int k = 0; k < NTAP; k++) begin
        hr[k] = 0.0; hi[k] = 0.0;
        if (TRMS[pt] == 0.0) begin if (k == 0) hr[k] = 1.0; end
        else begin
          hr[k] = gauss() * $exp(-k / (2.0 * TRMS[pt])); hi[k] = gauss() * $exp(-k / (2.0 * TRMS[pt]));
        end
        hp += hr[k] * hr[k] + hi[k] * hi[k];
      end
      for (int k = 0; k < NTAP; k++) begin hr[k] /= $sqrt(hp); hi[k] /= $sqrt(hp); end
      end
      snr   = 10.0 ** (SNR_DB[pt] / 10.0);
      sigma = $sqrt(64.0 * G * G / snr / 2.0);
      fo    = 2.0 * PI * FO[pt]; phi0 = PHI[pt];
      for (int n = 0; n < NSAMP; n++) begin
        zr = 0.0; zi = 0.0;
        for (int k = 0; k < NTAP && k <= n; k++) begin
          zr += hr[k] * tx_re[n - k] - hi[k] * tx_im[n - k];
          zi += hr[k] * tx_im[n - k] + hi[k] * tx_re[n - k];
        end
        cr = zr * $cos(fo * n + phi0) - zi * $sin(fo * n + phi0) + sigma * gauss();
        ci = zr * $sin(fo * n + phi0) + zi * $cos(fo * n + phi0) + sigma * gauss();
        q_re[n] = $rtoi($floor(32768.0 * cr + 0.5)); q_im[n] = $rtoi($floor(32768.0 * ci + 0.5));
        q_re[n] = (q_re[n] > 32767) ? 32767 : (q_re[n] < -32768) ? -32768 : q_re[n];
        q_im[n] = (q_im[n] > 32767) ? 32767 : (q_im[n] < -32768) ? -32768 : q_im[n];
      end
      // host: frequency step
      cr = 0.0; ci = 0.0;
      for (int n = 0; n < 16; n++) begin
        cr += real'(q_re[96 + n]) * q_re[32 + n] + real'(q_im[96 + n]) * q_im[32 + n];
        ci += real'(q_im[96 + n]) * q_re[32 + n] - real'(q_re[96 + n]) * q_im[32 + n];
      end
      est  = $atan2(ci, cr) / 64.0;
      step = $rtoi($floor(-est * 65536.0 / (2.0 * PI) + 0.5));
      est  = -step * 2.0 * PI / 65536.0;   // the reference uses the same quantized step
      cfg_to(1, 2, 0);
      cfg_word(1, 0, 16'(step));
      eq_enable = 0;
      @(negedge clk); frame_start = 1; @(negedge clk); frame_start = 0;
      feed(0, 160);
      wait (tap.size() == 104);
      n_sat = 0;
      cfg_to(3, 0, 0);
      for (int p = 0; p < 52; p++) begin
        zr = tap[52 + p].re / 32768.0; zi = tap[52 + p].im / 32768.0; den = zr * zr + zi * zi;
        cfg_word(3, 0, coef(CSEQ[p] * zr / den));
      end
      cfg_to(3, 1, 0);
      for (int p = 0; p < 52; p++) begin
        zr = tap[52 + p].re / 32768.0; zi = tap[52 + p].im / 32768.0; den = zr * zr + zi * zi;
        cfg_word(3, 0, coef(-CSEQ[p] * zi / den));
      end
      eq_enable = 1;
      feed(160, NSAMP);
      wait (got.size() == NSYM * 48);
      // floating-point reference receiver
      ref_fft(96, est, yr, yi);
      for (int p = 0; p < 52; p++) begin
        den = yr[p] * yr[p] + yi[p] * yi[p];
        cr_[p] = CSEQ[p] * yr[p] / den; ci_[p] = -CSEQ[p] * yi[p] / den;
      end
      close = 0;
      for (int s = 0; s < NSYM; s++) begin
        ref_fft(160 + s * 80 + 16, est, yr, yi);
        sr = 0.0; si = 0.0; pk = 0;
        for (int p = 0; p < 52; p++) if (is_pilot_pos(6'(p))) begin
          zr = yr[p] * cr_[p] - yi[p] * ci_[p]; zi = yr[p] * ci_[p] + yi[p] * cr_[p];
          sr += (pk == 3) ? -zr : zr; si += (pk == 3) ? -zi : zi; pk++;
        end
        sr /= 4.0; si /= 4.0; den = sr * sr + si * si;
        cpr = pd[s] * sr / den; cpi = -pd[s] * si / den;
        for (int p = 0; p < 52; p++) if (!is_pilot_pos(6'(p))) begin
          zr = yr[p] * cr_[p] - yi[p] * ci_[p]; zi = yr[p] * ci_[p] + yi[p] * cr_[p];
          vr = zr * cpr - zi * cpi; vi = zr * cpi + zi * cpr;
          ref_words.push_back((qam16_bits(vr) << 2) | qam16_bits(vi));
          // a decision within 0.03 of a threshold may legitimately differ
          v = 2.0 / $sqrt(10.0);
          if ((vr > -v - 0.03 && vr < -v + 0.03) || (vr > -0.03 && vr < 0.03) || (vr > v - 0.03 && vr < v + 0.03) ||
              (vi > -v - 0.03 && vi < -v + 0.03) || (vi > -0.03 && vi < 0.03) || (vi > v - 0.03 && vi < v + 0.03))
            close++;
        end
      end
      err_ref = 0; err_rtl = 0;
      for (int k = 0; k < NSYM * 48; k++) begin
        err_ref += popc4(ref_words[k] ^ sent[k]);
        err_rtl += popc4(got[k] ^ sent[k]);
      end
      $display("tau_rms %3.1f samples, offset %7.4f cycles/sample, Es/N0 %4.1f dB: bits %0d, errors fixed-point %0d (BER %e), floating-point %0d (BER %e), close calls %0d, saturated coefficients %0d",
               TRMS[pt], FO[pt], SNR_DB[pt], NSYM * 192, err_rtl, err_rtl / (NSYM * 192.0), err_ref, err_ref / (NSYM * 192.0), close, n_sat);
      if (n_sat > 0) $display("  a coefficient is beyond the Q8.8 range: fixed-point and floating-point not compared");
      else checks++;
      if (n_sat == 0 && (err_rtl > err_ref + err_ref / 10 + 2 + 2 * close || err_rtl < err_ref - err_ref / 10 - 2 - 2 * close)) begin
        failures++; $display("fixed-point and floating-point error counts differ too much");
      end
      if (pt > 0 && TRMS[pt] == TRMS[pt - 1]) begin
        checks++;
        if (err_rtl > prev_ber_bits) begin failures++; $display("error rate does not fall with Es/N0"); end
      end
      prev_ber_bits = err_rtl;
      if (TRMS[pt] == 0.0) awgn_top = err_rtl;
      repeat (50) @(negedge clk);
    end
    checks++;
    if (awgn_top * 1000 >= NSYM * 192) begin failures++; $display("BER of 1e-3 or more at the highest Es/N0 without multipath"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
