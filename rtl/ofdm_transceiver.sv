// ofdm_transceiver: OFDM transmitter and receiver joined back to back.
//
// The transmitter turns each 4-bit input nibble into one 8-point 16-QAM OFDM
// symbol with a cyclic prefix (20 16-bit words). Its word stream is brought
// out on tx_* and also fed, through an ideal channel, into the receiver,
// which strips the prefix, runs the FFT and returns the four data
// sub-carriers on rx_*. Each returned value is the transmitted QAM point
// within a few LSBs. Transmitter and receiver are the two halves of the
// described system; the loopback joining them is this implementation's
// choice.
//
// Interface: see ofdm_transmitter (input FIFO handshake, wrfull hold) and
// ofdm_receiver (data sub-carrier output). Timing: with wrfull low a symbol
// takes 29 clocks; its first data sub-carrier leaves the receiver 34 clocks
// after its readreq.
module ofdm_transceiver
  import ofdm_pkg::*;
#(
  parameter int unsigned N_CP = ofdm_pkg::OFDM_N_CP
) (
  input  logic                     clock,
  input  logic                     arst_n,
  input  logic [3:0]               in_data,
  input  logic                     readempty,
  output logic                     readreq,
  input  logic                     wrfull,
  output sample_t                  tx_data,
  output logic                     tx_valid,
  output logic                     start_output,
  output sample_t                  rx_re,
  output sample_t                  rx_im,
  output logic                     rx_valid,
  output logic [$clog2(OFDM_N_REP)-1:0] rx_index
);


  ofdm_transmitter #(.N_CP(N_CP)) u_tx (
    .clock, .arst_n, .in_data, .readempty, .readreq, .wrfull,
    .out_data(tx_data), .out_valid(tx_valid), .start_output
  );

  ofdm_receiver #(.N_CP(N_CP)) u_rx (
    .clock, .arst_n, .enable(tx_valid), .in_start(start_output), .in_data(tx_data),
    .out_re(rx_re), .out_im(rx_im), .out_valid(rx_valid), .out_index(rx_index)
  );

endmodule
