// Cyclic prefix removal.
//
// Every OFDM symbol of the received sample stream is 80 complex samples: a 16-sample
// prefix (a copy of the symbol's last 16 samples) followed by the 64 samples that the
// FFT needs. With the sampling clocks of transmitter and receiver synchronised, the
// symbol boundary is fixed relative to the start of the frame, so the block simply
// counts samples from frame_start and drops the first NCP of every NSYM. Kept samples
// pass through combinationally (valid/ready); dropped samples are accepted without
// waiting for the downstream side.
// The symbol and prefix lengths follow HiperLAN/2. The fixed-position removal is this
// design's simplest reading of the synchronised case; finding the prefix by correlating
// 16 samples with those 64 samples earlier (needed when the windows drift) is not
// built.
module prefix_removal
  import hl2_pkg::*;
#(
  parameter int NCP_P  = NCP,
  parameter int NSYM_P = NSYM
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  frame_start,
  input  logic  in_valid,
  output logic  in_ready,
  input  cplx_t in_data,
  output logic  out_valid,
  input  logic  out_ready,
  output cplx_t out_data,
  output logic  dropping
);
  logic [$clog2(NSYM_P)-1:0] pos;

  assign dropping  = (pos < ($clog2(NSYM_P))'(NCP_P));
  assign out_valid = in_valid && !dropping;
  assign out_data  = in_data;
  assign in_ready  = dropping || out_ready;

  always_ff @(posedge clk) begin
    if (!rst_n || frame_start) pos <= '0;
    else if (in_valid && in_ready)
      pos <= (pos == ($clog2(NSYM_P))'(NSYM_P - 1)) ? '0 : pos + 1'b1;
  end
endmodule
