// Montium tile 1: frequency offset correction of one OFDM symbol.
//
// The symbol's 64 complex time samples arrive on the input stream (one 32-bit
// sample per clock, valid/ready) and are stored in memories M05/M06 (real/imag).
// Execution then rotates sample n by the angle n*step: the phase offset between two
// samples, 'step', is read from M03 address 0; a 16-bit phase accumulator holds n*step
// in units of 2*pi/65536 and its top 9 bits index the cosine table in M01 and the sine
// table in M02 (both 512 entries, Q1.15, loaded through the configuration unit). The
// table value is multiplied with the sample on the four-ALU complex multiplier and
// written back in place. Execution takes 67 cycles: one to fetch the step, 64 issue
// cycles and a two-cycle pipeline tail (memory read, multiply). The corrected samples
// then leave on the output stream.
//
// Configuration (cfg_*): 16-bit words for the tile's CCU, see montium_ccu. M01 entry i
// should hold round(32767*cos(2*pi*i/512)), M02 entry i round(32767*sin(2*pi*i/512)).
// Timing: LOAD (64 input cycles), EXEC (67 cycles, exec_busy high), SEND (64 output
// cycles when out_ready stays high); a stalled output holds the tile in SEND.
// The 64 samples, the 67-cycle execution, the per-frame step kept in memory and the
// LUT-then-multiply scheme follow the document; the phase restarting at zero for every
// symbol (the remaining common phase is removed by the pilot-based phase corrector
// in tile 3), the accumulator width and the memory assignment are this design's own.
module fo_tile
  import hl2_pkg::*;
#(
  parameter int N = 64
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        cfg_valid,
  input  logic        cfg_hdr,
  input  logic [15:0] cfg_data,
  input  logic        in_valid,
  output logic        in_ready,
  input  cplx_t       in_data,
  output logic        out_valid,
  input  logic        out_ready,
  output cplx_t       out_data,
  output logic        exec_busy
);
  localparam int EXEC_CYCLES = N + 3;

  typedef enum logic [1:0] {S_LOAD, S_EXEC, S_SEND} state_e;
  state_e state;
  logic [6:0] cnt;   // LOAD: samples in, EXEC: cycle, SEND: sample out

  logic        wr_en;
  logic [3:0]  wr_mem;
  logic [8:0]  wr_addr;
  logic [15:0] wr_data;

  montium_ccu u_ccu (.clk, .rst_n, .cfg_valid, .cfg_hdr, .cfg_data,
                     .wr_en, .wr_mem, .wr_addr, .wr_data);

  // Memories: M01 cos, M02 sin, M03 step, M05/M06 samples.
  logic [8:0]  lut_raddr;
  logic [15:0] cos_q, sin_q, step_q, sre_q, sim_q;
  logic        s_we;
  logic [8:0]  s_waddr, s_raddr;
  cplx_t       s_wdata;

  montium_mem u_m01 (.clk, .we(wr_en && wr_mem == 4'd0), .waddr(wr_addr), .wdata(wr_data),
                     .raddr(lut_raddr), .rdata(cos_q));
  montium_mem u_m02 (.clk, .we(wr_en && wr_mem == 4'd1), .waddr(wr_addr), .wdata(wr_data),
                     .raddr(lut_raddr), .rdata(sin_q));
  montium_mem u_m03 (.clk, .we(wr_en && wr_mem == 4'd2), .waddr(wr_addr), .wdata(wr_data),
                     .raddr(9'd0), .rdata(step_q));
  montium_mem u_m05 (.clk, .we(s_we), .waddr(s_waddr), .wdata(s_wdata.re),
                     .raddr(s_raddr), .rdata(sre_q));
  montium_mem u_m06 (.clk, .we(s_we), .waddr(s_waddr), .wdata(s_wdata.im),
                     .raddr(s_raddr), .rdata(sim_q));

  // Sample write address during LOAD comes from an AGU (base 0, stride 1).
  logic       in_fire, out_fire;
  logic [8:0] load_addr;
  logic       agu_start;
  // (re)start at base 0 while waiting for a symbol's first sample and after the last send
  assign agu_start = (state == S_LOAD && cnt == 7'd0 && !in_fire)
                  || (state == S_SEND && out_fire && cnt == 7'(N - 1));
  montium_agu #(.AW(9)) u_agu (.clk, .rst_n, .start(agu_start),
                               .base(9'd0), .stride(9'd1), .step(in_fire), .addr(load_addr));

  logic [15:0] phase;
  logic        v1, v2;     // pipeline valid: memory read, multiply
  logic [5:0]  n1, n2;     // pipeline sample index
  cplx_t       prod;

  assign in_ready  = (state == S_LOAD);
  assign in_fire   = in_valid && in_ready;
  assign out_valid = (state == S_SEND);
  assign out_fire  = out_valid && out_ready;
  assign out_data  = '{re: sre_q, im: sim_q};
  assign exec_busy = (state == S_EXEC);

  // Issue of sample n = cnt-1 in EXEC cycles 1..N.
  logic issue;
  assign issue     = (state == S_EXEC) && cnt >= 7'd1 && cnt <= 7'(N);
  assign lut_raddr = phase[15:7];

  montium_cmul u_cmul (.clk, .rst_n, .load(v1),
                       .x('{re: sre_q, im: sim_q}), .y('{re: cos_q, im: sin_q}),
                       .shift(5'd15), .p(prod));

  always_comb begin
    s_we    = 1'b0;
    s_waddr = load_addr;
    s_wdata = in_data;
    s_raddr = 9'(cnt);
    if (state == S_LOAD) begin
      s_we = in_fire;
    end else if (state == S_EXEC) begin
      s_we    = v2;
      s_waddr = 9'(n2);
      s_wdata = prod;
      s_raddr = 9'(cnt - 7'd1);
      if (cnt == 7'(EXEC_CYCLES - 1)) s_raddr = 9'd0;  // prefetch first output word
    end else begin
      s_raddr = out_fire ? 9'(cnt + 7'd1) : 9'(cnt);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_LOAD;
      cnt   <= '0;
      phase <= '0;
      v1 <= 1'b0; v2 <= 1'b0; n1 <= '0; n2 <= '0;
    end else begin
      v1 <= issue;
      n1 <= 6'(cnt - 7'd1);
      v2 <= v1;
      n2 <= n1;
      unique case (state)
        S_LOAD: if (in_fire) begin
          if (cnt == 7'(N - 1)) begin
            state <= S_EXEC;
            cnt   <= '0;
            phase <= '0;
          end else cnt <= cnt + 7'd1;
        end
        S_EXEC: begin
          if (issue) phase <= phase + step_q;
          if (cnt == 7'(EXEC_CYCLES - 1)) begin
            state <= S_SEND;
            cnt   <= '0;
          end else cnt <= cnt + 7'd1;
        end
        default: if (out_fire) begin
          if (cnt == 7'(N - 1)) begin
            state <= S_LOAD;
            cnt   <= '0;
          end else cnt <= cnt + 7'd1;
        end
      endcase
    end
  end
endmodule
