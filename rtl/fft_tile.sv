// Montium tile 2: inverse OFDM by a 64-point FFT.
//
// The 64 frequency-corrected time samples of a symbol arrive on the input stream and
// are stored in natural order. Execution runs a radix-2 decimation-in-frequency FFT
// in place: six stages of 32 butterflies, one butterfly issued per cycle. A butterfly
// reads two words (registered, like a memory read), forms (a+b)/2 and (a-b)/2 on two
// ALUs in add/subtract mode, and multiplies the difference by the twiddle factor
// W64^k on the four-ALU complex multiplier; both results are written back one cycle
// later. Each stage waits for its last write, so a stage takes 32 + 2 cycles and the
// whole transform 6 * 34 = 204 cycles. The halving in every stage keeps the result in
// range: the output is X[k] / 64 with X[k] = sum_n x[n] * exp(-j*2*pi*n*k/64).
// The results sit in bit-reversed order; the tile sends the 52 used subcarriers in
// the order -26..-1, +1..+26 (one per cycle, valid/ready).
// Twiddles: round(32767*cos(2*pi*k/64)) - j*round(32767*sin(2*pi*k/64)), k = 0..31,
// computed at elaboration into a constant table.
// The 64-point transform and its 204-cycle execution time follow the document; the
// radix-2 in-place algorithm, the per-stage scaling and the output order are this
// design's own (the document takes the FFT from an existing library).
module fft_tile
  import hl2_pkg::*;
#(
  parameter int N = 64
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  output logic  in_ready,
  input  cplx_t in_data,
  output logic  out_valid,
  input  logic  out_ready,
  output cplx_t out_data,
  output logic  exec_busy
);
  localparam int LOGN  = $clog2(N);
  localparam int HALF  = N / 2;
  localparam int STAGE_CYCLES = HALF + 2;
  localparam int NOUT  = N * 13 / 16;   // 52 used subcarriers for N = 64

  function automatic logic signed [15:0] tw_cos(input int k);
    return 16'($rtoi($floor(32767.0 * $cos(2.0 * 3.14159265358979 * k / N) + 0.5)));
  endfunction
  function automatic logic signed [15:0] tw_msin(input int k);
    return 16'(-$rtoi($floor(32767.0 * $sin(2.0 * 3.14159265358979 * k / N) + 0.5)));
  endfunction
  cplx_t TW [HALF];
  for (genvar k = 0; k < HALF; k++) begin : g_tw
    localparam logic signed [15:0] TWR = tw_cos(k);
    localparam logic signed [15:0] TWI = tw_msin(k);
    assign TW[k] = '{re: TWR, im: TWI};
  end

  function automatic logic [LOGN-1:0] bitrev(input logic [LOGN-1:0] v);
    for (int i = 0; i < LOGN; i++) bitrev[i] = v[LOGN-1-i];
  endfunction

  // Subcarrier index (mod N) of output position p: -26..-1 then +1..+26.
  function automatic logic [LOGN-1:0] out_bin(input logic [6:0] p);
    if (p < 7'(NOUT / 2)) return LOGN'(N - NOUT / 2 + int'(p));
    else                  return LOGN'(int'(p) - NOUT / 2 + 1);
  endfunction

  typedef enum logic [1:0] {S_LOAD, S_EXEC, S_SEND} state_e;
  state_e state;

  cplx_t buf_q [N];
  logic [6:0]  cnt;      // LOAD/SEND: word index, EXEC: cycle in stage
  logic [2:0]  stage;
  logic        in_fire, out_fire;

  assign in_ready  = (state == S_LOAD);
  assign in_fire   = in_valid && in_ready;
  assign out_valid = (state == S_SEND);
  assign out_fire  = out_valid && out_ready;
  assign out_data  = buf_q[bitrev(out_bin(cnt))];
  assign exec_busy = (state == S_EXEC);

  // Butterfly addressing for issue b = cnt in stage s: span = N/2 >> s.
  logic                issue;
  logic [LOGN-1:0]     i0, i1;
  logic [LOGN-2:0]     tw_idx;
  logic [LOGN-2:0]     b;
  always_comb begin
    int span, grp, pos;
    b    = cnt[LOGN-2:0];
    span = HALF >> stage;
    grp  = int'(b) / span;
    pos  = int'(b) % span;
    i0   = LOGN'(grp * 2 * span + pos);
    i1   = LOGN'(grp * 2 * span + pos + span);
    tw_idx = (LOGN-1)'(pos << stage);
  end
  assign issue = (state == S_EXEC) && cnt < 7'(HALF);

  // Pipeline stage 1: registered operand read.
  cplx_t           ra, rb, tw_q;
  logic            v1, v2;
  logic [LOGN-1:0] j0_1, j1_1, j0_2, j1_2;
  // Stage 2: add/subtract on two ALUs, difference into the multiplier.
  cplx_t sum, dif, sum_q, prod;
  logic [15:0] unused_w1, unused_w2;
  logic [31:0] unused_e1, unused_e2;

  montium_alu u_alu_re (.op(ALU_ADDSUB), .shift(5'd1), .a(16'sd0), .b(16'sd0), .c(ra.re), .d(rb.re),
                        .east_in(32'sd0), .out1(sum.re), .out2(dif.re), .west_out(unused_e1));
  montium_alu u_alu_im (.op(ALU_ADDSUB), .shift(5'd1), .a(16'sd0), .b(16'sd0), .c(ra.im), .d(rb.im),
                        .east_in(32'sd0), .out1(sum.im), .out2(dif.im), .west_out(unused_e2));
  assign unused_w1 = unused_e1[15:0];
  assign unused_w2 = unused_e2[15:0];

  montium_cmul u_cmul (.clk, .rst_n, .load(v1), .x(dif), .y(tw_q), .shift(5'd15), .p(prod));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_LOAD;
      cnt   <= '0;
      stage <= '0;
      v1 <= 1'b0; v2 <= 1'b0;
      ra <= '0; rb <= '0; tw_q <= '0; sum_q <= '0;
      j0_1 <= '0; j1_1 <= '0; j0_2 <= '0; j1_2 <= '0;
    end else begin
      v1   <= issue;
      ra   <= buf_q[i0];
      rb   <= buf_q[i1];
      tw_q <= TW[tw_idx];
      j0_1 <= i0;
      j1_1 <= i1;
      v2    <= v1;
      sum_q <= sum;
      j0_2  <= j0_1;
      j1_2  <= j1_1;
      if (v2) begin
        buf_q[j0_2] <= sum_q;
        buf_q[j1_2] <= prod;
      end
      unique case (state)
        S_LOAD: if (in_fire) begin
          buf_q[cnt[LOGN-1:0]] <= in_data;
          if (cnt == 7'(N - 1)) begin
            state <= S_EXEC;
            cnt   <= '0;
            stage <= '0;
          end else cnt <= cnt + 7'd1;
        end
        S_EXEC: begin
          if (cnt == 7'(STAGE_CYCLES - 1)) begin
            cnt <= '0;
            if (stage == 3'(LOGN - 1)) state <= S_SEND;
            else stage <= stage + 3'd1;
          end else cnt <= cnt + 7'd1;
        end
        default: if (out_fire) begin
          if (cnt == 7'(NOUT - 1)) begin
            state <= S_LOAD;
            cnt   <= '0;
          end else cnt <= cnt + 7'd1;
        end
      endcase
    end
  end
endmodule
