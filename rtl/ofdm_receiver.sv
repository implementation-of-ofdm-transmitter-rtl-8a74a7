// ofdm_receiver: OFDM receiver matching ofdm_transmitter.
//
// The received 16-bit word stream (real then imaginary part of each sample,
// cyclic prefix first) passes through
//   cp_removal             drops the 4 prefix words of each symbol
//   serial_to_parallel     gathers the 16 remaining words into 8 complex samples
//   fft8                   8-point FFT back to the frequency bins
//   rx_parallel_to_serial  sends the 4 data bins, one per clock
// Each data bin carries the transmitted 16-QAM point (levels +-2048,
// +-6144 by default) within a few LSBs. Prefix removal, serial-to-parallel,
// the FFT and the parallel-to-serial step follow the design description;
// in_start alignment and the output format are this implementation's
// choices.
//
// Interface: enable marks a valid in_data word, in_start the first word of a
// symbol. Timing: the first data bin leaves 6 clocks after the last word of
// its symbol entered, the fourth one 3 clocks later.
module ofdm_receiver
  import ofdm_pkg::*;
#(
  parameter int unsigned N_CP = ofdm_pkg::OFDM_N_CP
) (
  input  logic                     clock,
  input  logic                     arst_n,
  input  logic                     enable,
  input  logic                     in_start,
  input  sample_t                  in_data,
  output sample_t                  out_re,
  output sample_t                  out_im,
  output logic                     out_valid,
  output logic [$clog2(OFDM_N_REP)-1:0] out_index
);

  localparam int unsigned N_FFT = OFDM_N_FFT;
  localparam int unsigned N_REP = OFDM_N_REP;
  localparam int unsigned N_PAD = OFDM_N_PAD;

  localparam int unsigned POS_W = $clog2(2 * N_FFT);

  logic             body_valid, body_last;
  sample_t          body_data;
  logic [POS_W-1:0] body_pos;
  logic             par_valid;
  cplx_t            par_data [N_FFT];
  logic             fft_valid;
  cplx_t            fft_data [N_FFT];
  cplx_t            bin;

  cp_removal #(.N_FFT(N_FFT), .N_CP(N_CP)) u_cprm (
    .clock, .arst_n, .in_valid(enable), .in_start, .in_data,
    .out_valid(body_valid), .out_data(body_data), .out_pos(body_pos), .out_last(body_last)
  );

  serial_to_parallel #(.N_FFT(N_FFT)) u_s2p (
    .clock, .arst_n, .in_valid(body_valid), .in_data(body_data), .in_pos(body_pos),
    .in_last(body_last), .out_valid(par_valid), .out_data(par_data)
  );

  fft8 #(.INVERSE(1'b0)) u_fft (
    .clock, .arst_n, .in_valid(par_valid), .in_data(par_data),
    .out_valid(fft_valid), .out_data(fft_data)
  );

  rx_parallel_to_serial #(.N_FFT(N_FFT), .N_REP(N_REP), .N_PAD(N_PAD)) u_p2s (
    .clock, .arst_n, .in_valid(fft_valid), .in_data(fft_data),
    .out_valid, .out_data(bin), .out_index
  );

  assign out_re = bin.re;
  assign out_im = bin.im;

endmodule
