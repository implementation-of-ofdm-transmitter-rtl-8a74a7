// ofdm_transmitter: 16-QAM OFDM transmitter with an 8-point IFFT.
//
// Each 4-bit input nibble becomes one OFDM symbol:
//   control_unit     pops the nibble from the input FIFO (one symbol at a time)
//   qam16_mapper     nibble -> 16-QAM point (16-bit I and Q)
//   symbol_generator the point repeated on 4 sub-carriers (64 bits per component)
//   zero_padding     2 zero bins either side: 8 bins (128 bits per component)
//   tx_ifft          two 8-point IFFTs (I bins, Q bins) joined into 8 complex samples
//   cyclic_prefix    last 2 samples copied in front: 10 samples
//   output_module    20 16-bit words, real part then imaginary part of each sample
//
// The chain of blocks, the 4-bit input, the repetition, the padding, the
// 8-point size and the 16-bit output follow the design description; the
// FIFO-style handshake, the prefix length and the word order are this
// implementation's choices.
//
// Interface: in_data is the head of a show-ahead FIFO, valid while readempty
// is low; readreq pops it. A word leaves on out_data in every clock where
// out_valid is high; the sink holds the transmitter by raising wrfull.
// start_output marks the first word of each symbol.
// Timing: the first word of a symbol appears 9 clocks after its readreq;
// with wrfull low a symbol takes 29 clocks (20 words plus 9 clocks of
// pipeline fill, which are not overlapped with the previous symbol).
module ofdm_transmitter
  import ofdm_pkg::*;
#(
  parameter int unsigned N_CP = ofdm_pkg::OFDM_N_CP
) (
  input  logic       clock,
  input  logic       arst_n,
  input  logic [3:0] in_data,
  input  logic       readempty,
  output logic       readreq,
  input  logic       wrfull,
  output sample_t    out_data,
  output logic       out_valid,
  output logic       start_output
);

  localparam int unsigned N_FFT = OFDM_N_FFT;
  localparam int unsigned N_REP = OFDM_N_REP;
  localparam int unsigned N_PAD = OFDM_N_PAD;

  logic    symbol_done;
  logic    busy;
  logic    qam_valid;
  sample_t qam_i, qam_q;
  logic    sym_valid;
  sample_t sym_i [N_REP], sym_q [N_REP];
  logic    zp_valid;
  sample_t zp_i [N_FFT], zp_q [N_FFT];
  logic    ifft_valid;
  cplx_t   ifft_data [N_FFT];
  logic    cp_valid;
  cplx_t   cp_data [N_FFT + N_CP];

  control_unit u_control (
    .clock, .arst_n, .readempty, .symbol_done, .readreq, .busy
  );

  qam16_mapper u_qam (
    .clock, .arst_n, .in_valid(readreq), .in_bits(in_data),
    .out_valid(qam_valid), .out_i(qam_i), .out_q(qam_q)
  );

  symbol_generator #(.N_REP(N_REP)) u_symgen (
    .clock, .arst_n, .in_valid(qam_valid), .in_i(qam_i), .in_q(qam_q),
    .out_valid(sym_valid), .out_i(sym_i), .out_q(sym_q)
  );

  zero_padding #(.N_FFT(N_FFT), .N_REP(N_REP), .N_PAD(N_PAD)) u_zpad (
    .clock, .arst_n, .in_valid(sym_valid), .in_i(sym_i), .in_q(sym_q),
    .out_valid(zp_valid), .out_i(zp_i), .out_q(zp_q)
  );

  tx_ifft u_ifft (
    .clock, .arst_n, .in_valid(zp_valid), .in_i(zp_i), .in_q(zp_q),
    .out_valid(ifft_valid), .out_data(ifft_data)
  );

  cyclic_prefix #(.N_FFT(N_FFT), .N_CP(N_CP)) u_cp (
    .clock, .arst_n, .in_valid(ifft_valid), .in_data(ifft_data),
    .out_valid(cp_valid), .out_data(cp_data)
  );

  output_module #(.N_SAMP(N_FFT + N_CP)) u_out (
    .clock, .arst_n, .in_valid(cp_valid), .in_data(cp_data), .wrfull,
    .out_data, .out_valid, .start_output, .done(symbol_done)
  );

  a_pop_only_when_ready: assert property (@(posedge clock) disable iff (!arst_n)
    readreq |-> !readempty && !busy);

endmodule
