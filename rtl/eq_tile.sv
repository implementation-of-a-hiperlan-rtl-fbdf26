// Montium tile 3: equalization, phase offset correction and de-mapping.
//
// Per OFDM symbol the tile receives the 52 used subcarriers (order -26..-1, +1..+26,
// Q1.15) from the FFT tile, stores them in M06/M07, and in 110 execution cycles
//  1. fetches the predefined pilot value Pd(i) of symbol i from M03 (1 cycle);
//  2. equalizes the 48 data subcarriers, y * c >> EQ_SHIFT, with the coefficients c
//     in M01/M02, and stores the results (Q2.14) in M08/M09 (48 + 2 cycles);
//  3. equalizes the four pilots (not stored) and forms the phase offset coefficient
//         C = Pd(i) / S,   S = (P1 + P2 + P3 - P4) / 4,
//     as C = Pd(i) * conj(S) * R with R ~ 1/|S|^2 read from a 512-entry reciprocal
//     table indexed by |S|^2 (8 cycles);
//  4. multiplies every stored data value by C and, pipelined with it, de-maps the
//     result through one lookup table in M04 (48 + 3 cycles).
// De-map index: for both parts v of the corrected value,
//     part(v) = clamp((v >>> P0) + P1, 0, P2),   index = part(re) << P3 | part(im),
// with the four parameters P0..P3 in M05 addresses 0..3. The 16-bit table word at
// that index is the de-mapped symbol. Changing table and parameters switches the
// modulation (BPSK, QPSK, 16-QAM, 64-QAM) without touching the tile's logic.
//
// Memory map for the configuration unit (header bits [12:9]): 0/1 = M01/M02
// equalizer coefficients re/im (Q8.8 by default, address = subcarrier position 0..51),
// 2 = M03 pilot values Pd(i) (Q2.14, address = symbol index), 3 = M04 de-map table,
// 4 = M05 de-map parameters. Reciprocal table entry k = min(32767, round(2^22 / k)),
// so R is Q2.14 for |S|^2 in units of 2^-8.
// Control: frame_start clears the symbol index; a symbol that arrives while
// eq_enable is low (the preamble) is taken in and dropped without output.
// Timing: LOAD 52 cycles, EXEC 110 cycles, SEND 48 cycles with out_ready high.
// The sequence of operations, equation (4) with the inverted fourth pilot, the
// 8-cycle pilot step, the 110-cycle total, the single de-map table with four index
// parameters and the data kept in local memory follow the document. Number formats,
// the reciprocal-table division, the index formula and the memory map are this
// design's own.
module eq_tile
  import hl2_pkg::*;
#(
  parameter int EQ_SHIFT = 9
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        frame_start,
  input  logic        eq_enable,
  input  logic        cfg_valid,
  input  logic        cfg_hdr,
  input  logic [15:0] cfg_data,
  input  logic        in_valid,
  output logic        in_ready,
  input  cplx_t       in_data,
  output logic        out_valid,
  input  logic        out_ready,
  output logic [15:0] out_data,
  output logic        exec_busy
);
  localparam int EXEC_CYCLES = 110;
  localparam int A0 = 1;    // first data issue cycle
  localparam int B0 = 51;   // first pilot cycle
  localparam int C0 = 59;   // first correction issue cycle

  typedef enum logic [1:0] {S_LOAD, S_EXEC, S_SEND} state_e;
  state_e state;
  logic [6:0] cnt;        // LOAD/SEND word index, EXEC cycle
  logic [8:0] sym_idx;

  // Configuration unit.
  logic        wr_en;
  logic [3:0]  wr_mem;
  logic [8:0]  wr_addr;
  logic [15:0] wr_data;
  montium_ccu u_ccu (.clk, .rst_n, .cfg_valid, .cfg_hdr, .cfg_data,
                     .wr_en, .wr_mem, .wr_addr, .wr_data);

  function automatic logic [8:0] data_pos(input logic [6:0] d);
    int p;
    p = int'(d);
    p = p + ((d >= 7'd5) ? 1 : 0) + ((d >= 7'd18) ? 1 : 0) + ((d >= 7'd30) ? 1 : 0)
          + ((d >= 7'd43) ? 1 : 0);
    return 9'(p);
  endfunction

  function automatic logic [15:0] recip_entry(input int k);
    int r;
    r = (k == 0) ? 32767 : ((1 << 22) + k / 2) / k;
    return 16'((r > 32767) ? 32767 : r);
  endfunction
  logic [15:0] RECIP [MEM_DEPTH];
  for (genvar k = 0; k < MEM_DEPTH; k++) begin : g_recip
    localparam logic [15:0] RV = recip_entry(k);
    assign RECIP[k] = RV;
  end

  // Memories.
  logic [8:0]  in_raddr, eqd_raddr, tab_raddr, par_raddr, out_raddr, eqd_waddr, out_waddr;
  logic        in_we, eqd_we, out_we;
  logic [15:0] in_re_q, in_im_q, c_re_q, c_im_q, pd_q, tab_q, par_q, eqd_re_q, eqd_im_q, out_q;
  cplx_t       prod;

  montium_mem u_m01 (.clk, .we(wr_en && wr_mem == 4'd0), .waddr(wr_addr), .wdata(wr_data),
                     .raddr(in_raddr), .rdata(c_re_q));
  montium_mem u_m02 (.clk, .we(wr_en && wr_mem == 4'd1), .waddr(wr_addr), .wdata(wr_data),
                     .raddr(in_raddr), .rdata(c_im_q));
  montium_mem u_m03 (.clk, .we(wr_en && wr_mem == 4'd2), .waddr(wr_addr), .wdata(wr_data),
                     .raddr(sym_idx), .rdata(pd_q));
  montium_mem u_m04 (.clk, .we(wr_en && wr_mem == 4'd3), .waddr(wr_addr), .wdata(wr_data),
                     .raddr(tab_raddr), .rdata(tab_q));
  montium_mem u_m05 (.clk, .we(wr_en && wr_mem == 4'd4), .waddr(wr_addr), .wdata(wr_data),
                     .raddr(par_raddr), .rdata(par_q));
  montium_mem u_m06 (.clk, .we(in_we), .waddr(9'(cnt)), .wdata(in_data.re),
                     .raddr(in_raddr), .rdata(in_re_q));
  montium_mem u_m07 (.clk, .we(in_we), .waddr(9'(cnt)), .wdata(in_data.im),
                     .raddr(in_raddr), .rdata(in_im_q));
  montium_mem u_m08 (.clk, .we(eqd_we), .waddr(eqd_waddr), .wdata(prod.re),
                     .raddr(eqd_raddr), .rdata(eqd_re_q));
  montium_mem u_m09 (.clk, .we(eqd_we), .waddr(eqd_waddr), .wdata(prod.im),
                     .raddr(eqd_raddr), .rdata(eqd_im_q));
  montium_mem u_m10 (.clk, .we(out_we), .waddr(out_waddr), .wdata(tab_q),
                     .raddr(out_raddr), .rdata(out_q));

  logic in_fire, out_fire, exec;
  assign in_ready  = (state == S_LOAD);
  assign in_fire   = in_valid && in_ready;
  assign out_valid = (state == S_SEND);
  assign out_fire  = out_valid && out_ready;
  assign out_data  = out_q;
  assign exec      = (state == S_EXEC);
  assign exec_busy = exec;
  assign in_we     = in_fire;

  // Issue flags per execution cycle.
  logic issue_a, issue_b, issue_c;
  assign issue_a = exec && cnt >= 7'(A0) && cnt < 7'(A0 + NDATA);
  assign issue_b = exec && cnt >= 7'(B0) && cnt < 7'(B0 + NPILOT);
  assign issue_c = exec && cnt >= 7'(C0) && cnt < 7'(C0 + NDATA);

  // Pipeline registers: 1 = operands read, 2 = product ready, 3 = table read.
  logic       va1, va2, vb1, vb2, vc1, vc2, vc3;
  logic [5:0] d1, d2, d3;
  logic [1:0] k1, k2;

  // Demap parameters, phase coefficient, pilot accumulator.
  logic [3:0]         p_shift, p_bits;
  logic signed [15:0] p_off, p_max;
  cplx_t              c_po;
  logic signed [17:0] acc_re, acc_im;
  logic signed [15:0] s_re, s_im, s_re_q, s_im_q;
  logic [15:0]        r_q;

  always_comb begin
    in_raddr = '0;
    if (issue_a) in_raddr = data_pos(cnt - 7'(A0));
    else if (issue_b) begin
      unique case (2'(cnt - 7'(B0)))
        2'd0: in_raddr = 9'(PILOT_POS[0]);
        2'd1: in_raddr = 9'(PILOT_POS[1]);
        2'd2: in_raddr = 9'(PILOT_POS[2]);
        default: in_raddr = 9'(PILOT_POS[3]);
      endcase
    end
    eqd_raddr = 9'(cnt - 7'(C0));
    par_raddr = 9'(cnt - 7'd1);
    eqd_we    = va2;
    eqd_waddr = 9'(d2);
    out_we    = vc3;
    out_waddr = 9'(d3);
    if (state == S_SEND) out_raddr = out_fire ? 9'(cnt + 7'd1) : 9'(cnt);
    else                 out_raddr = 9'd0;
  end

  // Shared complex multiplier: equalization (A, B) or phase correction (C).
  cplx_t cm_x, cm_y;
  logic  cm_load;
  logic [4:0] cm_shift;
  assign cm_load  = va1 || vb1 || vc1;
  assign cm_x     = vc1 ? cplx_t'{re: eqd_re_q, im: eqd_im_q} : cplx_t'{re: in_re_q, im: in_im_q};
  assign cm_y     = vc1 ? c_po : cplx_t'{re: c_re_q, im: c_im_q};
  assign cm_shift = vc2 ? 5'd14 : 5'(EQ_SHIFT);

  montium_cmul u_cmul (.clk, .rst_n, .load(cm_load), .x(cm_x), .y(cm_y), .shift(cm_shift), .p(prod));

  // De-map index from the corrected value.
  function automatic logic [8:0] demap_part(input logic signed [15:0] v, input logic [3:0] sh,
                                            input logic signed [15:0] off,
                                            input logic signed [15:0] mx);
    logic signed [17:0] t;
    t = 18'(v >>> sh) + 18'(off);
    if (t < 0) return 9'd0;
    if (t > 18'(mx)) return 9'(mx);
    return 9'(t);
  endfunction
  assign tab_raddr = (demap_part(prod.re, p_shift, p_off, p_max) << p_bits)
                   | demap_part(prod.im, p_shift, p_off, p_max);

  // Phase offset coefficient: S, |S|^2, reciprocal, C.
  logic [31:0]        mag2;   // only bits [31:20] select the reciprocal
  logic [8:0]         ridx;
  logic signed [15:0] t_re, t_im;
  always_comb begin
    s_re = 16'(acc_re >>> 2);
    s_im = 16'(acc_im >>> 2);
    mag2 = 32'(s_re * s_re) + 32'(s_im * s_im);
    ridx = (mag2[31:20] > 12'd511) ? 9'd511 : mag2[28:20];
    t_re = sat16(rshift_round(48'(s_re_q) * 48'($signed({1'b0, r_q})), 5'd14));
    t_im = sat16(rshift_round(-(48'(s_im_q) * 48'($signed({1'b0, r_q}))), 5'd14));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_LOAD; cnt <= '0; sym_idx <= '0;
      va1 <= 1'b0; va2 <= 1'b0; vb1 <= 1'b0; vb2 <= 1'b0; vc1 <= 1'b0; vc2 <= 1'b0; vc3 <= 1'b0;
      d1 <= '0; d2 <= '0; d3 <= '0; k1 <= '0; k2 <= '0;
      p_shift <= '0; p_bits <= '0; p_off <= '0; p_max <= '0;
      c_po <= '0; acc_re <= '0; acc_im <= '0; s_re_q <= '0; s_im_q <= '0; r_q <= '0;
    end else begin
      va1 <= issue_a; va2 <= va1;
      vb1 <= issue_b; vb2 <= vb1;
      vc1 <= issue_c; vc2 <= vc1; vc3 <= vc2;
      d1 <= issue_c ? 6'(cnt - 7'(C0)) : 6'(cnt - 7'(A0));
      d2 <= d1; d3 <= d2;
      k1 <= 2'(cnt - 7'(B0)); k2 <= k1;
      if (exec) begin
        // demap parameters read from M05 at cycles 1..4, available one cycle later
        unique case (cnt)
          7'd2: p_shift <= par_q[3:0];
          7'd3: p_off   <= par_q;
          7'd4: p_max   <= par_q;
          7'd5: p_bits  <= par_q[3:0];
          default: ;
        endcase
        if (cnt == 7'd0) begin acc_re <= '0; acc_im <= '0; end
        if (vb2) begin
          if (k2 == 2'd3) begin
            acc_re <= acc_re - 18'(prod.re);
            acc_im <= acc_im - 18'(prod.im);
          end else begin
            acc_re <= acc_re + 18'(prod.re);
            acc_im <= acc_im + 18'(prod.im);
          end
        end
        if (cnt == 7'(B0 + 6)) begin   // S, reciprocal table read
          s_re_q <= s_re;
          s_im_q <= s_im;
          r_q    <= RECIP[ridx];
        end
        if (cnt == 7'(B0 + 7)) begin   // C = Pd * conj(S) * R
          c_po.re <= sat16(rshift_round(48'($signed(pd_q)) * 48'(t_re), 5'd14));
          c_po.im <= sat16(rshift_round(48'($signed(pd_q)) * 48'(t_im), 5'd14));
        end
      end
      if (frame_start) sym_idx <= '0;
      unique case (state)
        S_LOAD: if (in_fire) begin
          if (cnt == 7'(NUSED - 1)) begin
            cnt   <= '0;
            state <= eq_enable ? S_EXEC : S_LOAD;
          end else cnt <= cnt + 7'd1;
        end
        S_EXEC: begin
          if (cnt == 7'(EXEC_CYCLES - 1)) begin
            state <= S_SEND;
            cnt   <= '0;
            if (!frame_start) sym_idx <= sym_idx + 9'd1;
          end else cnt <= cnt + 7'd1;
        end
        default: if (out_fire) begin
          if (cnt == 7'(NDATA - 1)) begin
            state <= S_LOAD;
            cnt   <= '0;
          end else cnt <= cnt + 7'd1;
        end
      endcase
    end
  end
endmodule
