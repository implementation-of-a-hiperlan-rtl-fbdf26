// HiperLAN/2 receiver baseband on three Montium-style tiles.
//
// Received complex samples (Q1.15, 80 per OFDM symbol) enter on s_*. The chain is
//   prefix_removal -> fo_tile (tile 1, frequency offset correction)
//                  -> fft_tile (tile 2, inverse OFDM, 64-point FFT)
//                  -> eq_tile (tile 3, equalization, phase offset correction, de-mapping)
// and one 16-bit de-map table word per data subcarrier (48 per symbol) leaves on m_*.
// Tiles pass one complex value (32 bits) per clock with valid/ready handshakes; each
// tile takes in a whole symbol, processes it, and sends it on, so a tile that cannot
// send stalls the tiles before it.
// Each tile has its own 16-bit configuration port (cfg_valid, cfg_hdr, cfg_data,
// steered by cfg_tile: 1, 2 or 3; tile 2 needs none) through which a host processor
// writes the once-per-frame values it computes in software: the frequency offset
// step and the cosine/sine tables of tile 1, and the equalizer coefficients, pilot
// value list, de-map table and de-map parameters of tile 3. For that computation the
// FFT output of the preamble symbols is visible on fft_tap_*. frame_start marks the
// first sample of a MAC frame; eq_enable low makes tile 3 drop the symbols it receives
// (the preamble). exec_busy shows, per tile, the cycles spent executing.
// The partitioning over three tiles, the 32-bit per clock links and the software
// parts follow the document; the handshakes and port layout are this design's own.
module hl2_receiver
  import hl2_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        frame_start,
  input  logic        eq_enable,
  input  logic        s_valid,
  output logic        s_ready,
  input  cplx_t       s_data,
  input  logic        cfg_valid,
  input  logic [1:0]  cfg_tile,
  input  logic        cfg_hdr,
  input  logic [15:0] cfg_data,
  output logic        fft_tap_valid,
  output cplx_t       fft_tap_data,
  output logic        m_valid,
  input  logic        m_ready,
  output logic [15:0] m_data,
  output logic [2:0]  exec_busy,
  output logic        prefix_dropping
);
  logic  pr_valid, pr_ready, fo_valid, fo_ready, ff_valid, ff_ready;
  cplx_t pr_data, fo_data, ff_data;

  prefix_removal u_prefix (
    .clk, .rst_n, .frame_start,
    .in_valid(s_valid), .in_ready(s_ready), .in_data(s_data),
    .out_valid(pr_valid), .out_ready(pr_ready), .out_data(pr_data),
    .dropping(prefix_dropping));

  fo_tile u_tile1 (
    .clk, .rst_n,
    .cfg_valid(cfg_valid && cfg_tile == 2'd1), .cfg_hdr, .cfg_data,
    .in_valid(pr_valid), .in_ready(pr_ready), .in_data(pr_data),
    .out_valid(fo_valid), .out_ready(fo_ready), .out_data(fo_data),
    .exec_busy(exec_busy[0]));

  fft_tile u_tile2 (
    .clk, .rst_n,
    .in_valid(fo_valid), .in_ready(fo_ready), .in_data(fo_data),
    .out_valid(ff_valid), .out_ready(ff_ready), .out_data(ff_data),
    .exec_busy(exec_busy[1]));

  assign fft_tap_valid = ff_valid && ff_ready;
  assign fft_tap_data  = ff_data;

  eq_tile u_tile3 (
    .clk, .rst_n, .frame_start, .eq_enable,
    .cfg_valid(cfg_valid && cfg_tile == 2'd3), .cfg_hdr, .cfg_data,
    .in_valid(ff_valid), .in_ready(ff_ready), .in_data(ff_data),
    .out_valid(m_valid), .out_ready(m_ready), .out_data(m_data),
    .exec_busy(exec_busy[2]));
endmodule
