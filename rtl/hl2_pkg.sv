// Shared types and constants of the HiperLAN/2 receiver.
//
// A complex sample is a pair of signed 16-bit words {re, im}; 32 bits travel per clock
// between tiles. Time samples are Q1.15. The OFDM numbers (64-point symbols, 16-sample
// prefix, 52 used subcarriers of which 48 carry data and 4 carry pilots at -21, -7, +7
// and +21) follow the HiperLAN/2 physical layer. The ALU operation set, the memory
// numbering and the configuration header layout are this design's own choices.
package hl2_pkg;

  localparam int NFFT   = 64;   // time samples per OFDM symbol after prefix removal
  localparam int NCP    = 16;   // cyclic prefix length
  localparam int NSYM   = 80;   // samples per OFDM symbol including the prefix
  localparam int NUSED  = 52;   // used subcarriers, -26..-1 and +1..+26
  localparam int NDATA  = 48;   // data subcarriers
  localparam int NPILOT = 4;    // pilot subcarriers

  localparam int MEM_DEPTH = 512; // words per Montium local memory
  localparam int MEM_AW    = 9;

  typedef struct packed {
    logic signed [15:0] re;
    logic signed [15:0] im;
  } cplx_t;

  // Operations of the Montium ALU model (see montium_alu).
  typedef enum logic [1:0] {
    ALU_MUL    = 2'd0,  // z = A*B
    ALU_MULADD = 2'd1,  // z = A*B + E
    ALU_MULSUB = 2'd2,  // z = A*B - E
    ALU_ADDSUB = 2'd3   // out1 = C+D, out2 = C-D
  } alu_op_e;

  // Position (0..51) of a used subcarrier in the stream from the FFT tile to the
  // equalizer tile: -26..-1 map to 0..25, +1..+26 map to 26..51.
  localparam int PILOT_POS [NPILOT] = '{5, 19, 32, 46};

  function automatic logic is_pilot_pos(input logic [5:0] pos);
    return (pos == 6'd5) || (pos == 6'd19) || (pos == 6'd32) || (pos == 6'd46);
  endfunction

  // Saturate a wide signed value to 16 bits.
  function automatic logic signed [15:0] sat16(input logic signed [47:0] v);
    if (v > 48'sd32767)       return 16'sd32767;
    else if (v < -48'sd32768) return -16'sd32768;
    else                      return v[15:0];
  endfunction

  // Round-half-up arithmetic right shift of a signed 48-bit value.
  function automatic logic signed [47:0] rshift_round(input logic signed [47:0] v,
                                                      input logic [4:0] sh);
    logic signed [47:0] r;
    r = (sh == 5'd0) ? v : v + (48'sd1 <<< (sh - 5'd1));
    return r >>> sh;
  endfunction

endpackage
