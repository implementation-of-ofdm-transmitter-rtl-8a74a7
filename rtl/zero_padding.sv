// zero_padding: places the N_REP data bins inside an N_FFT-bin frequency
// vector with zeros on both sides.
//
// By default two zero bins (32 bits) go before and two after the four data
// bins (64 bits), giving 8 bins (128 bits) per component: bins 0..N_PAD-1
// and N_PAD+N_REP..N_FFT-1 are zero, bins N_PAD..N_PAD+N_REP-1 carry the
// data in order. The sizes follow the design description; taking "before"
// as the low bin indices and registering the output are this
// implementation's choices.
//
// The zero bins are constant outputs by design: a synthesis tool reports
// them as tied off, and the IFFT downstream simplifies accordingly.
//
// Timing: out_valid follows in_valid by one clock.
module zero_padding
  import ofdm_pkg::*;
#(
  parameter int unsigned N_FFT = ofdm_pkg::OFDM_N_FFT,
  parameter int unsigned N_REP = ofdm_pkg::OFDM_N_REP,
  parameter int unsigned N_PAD = ofdm_pkg::OFDM_N_PAD
) (
  input  logic    clock,
  input  logic    arst_n,
  input  logic    in_valid,
  input  sample_t in_i [N_REP],
  input  sample_t in_q [N_REP],
  output logic    out_valid,
  output sample_t out_i [N_FFT],
  output sample_t out_q [N_FFT]
);

  initial assert (N_PAD + N_REP <= N_FFT)
    else $error("zero_padding: data and leading zeros do not fit in N_FFT bins");

  always_ff @(posedge clock or negedge arst_n) begin
    if (!arst_n) begin
      out_valid <= 1'b0;
      for (int k = 0; k < int'(N_FFT); k++) begin
        out_i[k] <= '0;
        out_q[k] <= '0;
      end
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        for (int k = 0; k < int'(N_FFT); k++) begin
          if (k >= int'(N_PAD) && k < int'(N_PAD + N_REP)) begin
            out_i[k] <= in_i[k - int'(N_PAD)];
            out_q[k] <= in_q[k - int'(N_PAD)];
          end else begin
            out_i[k] <= '0;
            out_q[k] <= '0;
          end
        end
      end
    end
  end

endmodule
