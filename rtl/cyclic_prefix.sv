// cyclic_prefix: adds the cyclic prefix to one OFDM symbol.
//
// The last N_CP time samples of the N_FFT-sample symbol are copied in front
// of it, giving N_FFT+N_CP samples: out[j] = in[N_FFT-N_CP+j] for j < N_CP
// and out[j] = in[j-N_CP] otherwise. The prefix as a copy of the symbol's
// end follows the design description; its length (2 samples) is this
// implementation's choice.
//
// Timing: registered, out_valid follows in_valid by one clock.
module cyclic_prefix
  import ofdm_pkg::*;
#(
  parameter int unsigned N_FFT = ofdm_pkg::OFDM_N_FFT,
  parameter int unsigned N_CP  = ofdm_pkg::OFDM_N_CP
) (
  input  logic  clock,
  input  logic  arst_n,
  input  logic  in_valid,
  input  cplx_t in_data  [N_FFT],
  output logic  out_valid,
  output cplx_t out_data [N_FFT + N_CP]
);

  initial assert (N_CP <= N_FFT) else $error("cyclic_prefix: prefix longer than symbol");

  always_ff @(posedge clock or negedge arst_n) begin
    if (!arst_n) begin
      out_valid <= 1'b0;
      for (int j = 0; j < int'(N_FFT + N_CP); j++) out_data[j] <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        for (int j = 0; j < int'(N_FFT + N_CP); j++) begin
          if (j < int'(N_CP)) out_data[j] <= in_data[int'(N_FFT - N_CP) + j];
          else                out_data[j] <= in_data[j - int'(N_CP)];
        end
      end
    end
  end

endmodule
