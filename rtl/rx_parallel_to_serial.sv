// rx_parallel_to_serial: sends the data sub-carriers of a received symbol.
//
// When an FFT result arrives, the N_REP data held (held N_PAD to
// N_PAD+N_REP-1, where the transmitter placed the data) are latched and sent
// out one complex value per clock, with their index 0..N_REP-1. The zero
// held are not sent. Selecting only the data-carrying outputs and the
// parallel-to-serial step follow the design description; the one-value-per-
// clock format is this implementation's choice.
//
// Timing: the first value is registered in the clock edge that takes
// in_valid, the last one N_REP-1 clocks later. A new in_valid restarts the
// sequence.
module rx_parallel_to_serial
  import ofdm_pkg::*;
#(
  parameter int unsigned N_FFT = ofdm_pkg::OFDM_N_FFT,
  parameter int unsigned N_REP = ofdm_pkg::OFDM_N_REP,
  parameter int unsigned N_PAD = ofdm_pkg::OFDM_N_PAD
) (
  input  logic                       clock,
  input  logic                       arst_n,
  input  logic                       in_valid,
  input  cplx_t                      in_data [N_FFT],
  output logic                       out_valid,
  output cplx_t                      out_data,
  output logic [$clog2(N_REP)-1:0]   out_index
);

  localparam int unsigned IDX_W = $clog2(N_REP);

  cplx_t            held [N_REP];
  logic             active;
  logic [IDX_W-1:0] idx;

  always_ff @(posedge clock or negedge arst_n) begin
    if (!arst_n) begin
      active    <= 1'b0;
      idx       <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
      out_index <= '0;
      for (int k = 0; k < int'(N_REP); k++) held[k] <= '0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        for (int k = 0; k < int'(N_REP); k++) held[k] <= in_data[int'(N_PAD) + k];
        out_valid <= 1'b1;
        out_data  <= in_data[N_PAD];
        out_index <= '0;
        active    <= (N_REP > 1);
        idx       <= IDX_W'(1);
      end else if (active) begin
        out_valid <= 1'b1;
        out_data  <= held[idx];
        out_index <= idx;
        if (idx == IDX_W'(N_REP - 1)) active <= 1'b0;
        idx <= idx + 1'b1;
      end
    end
  end

endmodule
