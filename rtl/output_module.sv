// output_module: parallel-to-serial converter at the transmitter output.
//
// A whole symbol of N_SAMP complex samples (cyclic prefix included) is
// loaded at once and sent as 16-bit words, the real part of each sample
// first and then its imaginary part: 2*N_SAMP words per symbol. A 16-bit
// output word follows the design description; the real/imaginary word order
// and the wrfull hold are this implementation's choices.
//
// Interface and timing:
//  - in_valid loads in_data; it must only come while the module is idle
//    (checked by an assertion). The first word is presented the next clock.
//  - While a symbol is loaded, out_data shows the current word. A word is
//    taken in every clock in which wrfull is low; out_valid = busy & !wrfull
//    marks those clocks, so out_valid depends combinationally on wrfull.
//  - start_output marks the first word of a symbol, done its last word.
module output_module
  import ofdm_pkg::*;
#(
  parameter int unsigned N_SAMP = ofdm_pkg::OFDM_N_FFT + ofdm_pkg::OFDM_N_CP
) (
  input  logic    clock,
  input  logic    arst_n,
  input  logic    in_valid,
  input  cplx_t   in_data [N_SAMP],
  input  logic    wrfull,
  output sample_t out_data,
  output logic    out_valid,
  output logic    start_output,
  output logic    done
);

  localparam int unsigned N_WORDS = 2 * N_SAMP;
  localparam int unsigned WIDX_W  = $clog2(N_WORDS);

  cplx_t             buffer [N_SAMP];
  logic              busy;
  logic [WIDX_W-1:0] widx;
  logic              last_word;

  assign last_word    = (widx == WIDX_W'(N_WORDS - 1));
  assign out_valid    = busy & ~wrfull;
  assign start_output = out_valid & (widx == '0);
  assign done         = out_valid & last_word;
  assign out_data     = widx[0] ? buffer[widx[WIDX_W-1:1]].im : buffer[widx[WIDX_W-1:1]].re;

  always_ff @(posedge clock or negedge arst_n) begin
    if (!arst_n) begin
      busy <= 1'b0;
      widx <= '0;
      for (int j = 0; j < int'(N_SAMP); j++) buffer[j] <= '0;
    end else begin
      if (in_valid && !busy) begin
        buffer <= in_data;
        busy   <= 1'b1;
        widx   <= '0;
      end else if (out_valid) begin
        if (last_word) begin
          busy <= 1'b0;
          widx <= '0;
        end else begin
          widx <= widx + 1'b1;
        end
      end
    end
  end

  a_load_when_idle: assert property (@(posedge clock) disable iff (!arst_n) in_valid |-> !busy)
    else $error("output_module: symbol offered while the previous one is still being sent");

endmodule
