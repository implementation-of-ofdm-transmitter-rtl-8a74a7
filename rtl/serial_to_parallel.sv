// serial_to_parallel: gathers the received symbol body into one vector.
//
// Words arrive one at a time with their position in the symbol body
// (real part of sample p at position 2p, imaginary part at 2p+1). Each word
// is written into its slot; the word flagged in_last completes the vector,
// and out_valid pulses for one clock right after it. out_data shows the
// stored vector and stays stable until the next word arrives, which is at
// the earliest in the clock where out_valid is high, so a block sampling
// out_data with out_valid sees the complete symbol.
// The serial-to-parallel step follows the design description; the
// position-addressed write is this implementation's choice.
module serial_to_parallel
  import ofdm_pkg::*;
#(
  parameter int unsigned N_FFT = ofdm_pkg::OFDM_N_FFT
) (
  input  logic                       clock,
  input  logic                       arst_n,
  input  logic                       in_valid,
  input  sample_t                    in_data,
  input  logic [$clog2(2*N_FFT)-1:0] in_pos,
  input  logic                       in_last,
  output logic                       out_valid,
  output cplx_t                      out_data [N_FFT]
);

  localparam int unsigned POS_W = $clog2(2 * N_FFT);

  always_ff @(posedge clock or negedge arst_n) begin
    if (!arst_n) begin
      out_valid <= 1'b0;
      for (int p = 0; p < int'(N_FFT); p++) out_data[p] <= '0;
    end else begin
      out_valid <= in_valid & in_last;
      if (in_valid) begin
        if (in_pos[0]) out_data[in_pos[POS_W-1:1]].im <= in_data;
        else           out_data[in_pos[POS_W-1:1]].re <= in_data;
      end
    end
  end

endmodule
