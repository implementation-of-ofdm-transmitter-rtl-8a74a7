// cp_removal: strips the cyclic prefix from the received word stream.
//
// The receiver gets each symbol as 2*(N_FFT+N_CP) 16-bit words (real then
// imaginary part of each sample, prefix first). This block counts the words
// of the symbol, drops the first 2*N_CP of them (the prefix) and forwards
// the other 2*N_FFT words together with their position inside the symbol
// body. in_start, given with the first word of a symbol, restarts the count,
// so the receiver re-aligns on every symbol. Removing the prefix follows the
// design description; doing it on the word stream before the words are
// gathered, and the in_start alignment, are this implementation's choices.
//
// Timing: registered, out_* follow the accepted in_* by one clock.
module cp_removal
  import ofdm_pkg::*;
#(
  parameter int unsigned N_FFT = ofdm_pkg::OFDM_N_FFT,
  parameter int unsigned N_CP  = ofdm_pkg::OFDM_N_CP
) (
  input  logic                        clock,
  input  logic                        arst_n,
  input  logic                        in_valid,
  input  logic                        in_start,
  input  sample_t                     in_data,
  output logic                        out_valid,
  output sample_t                     out_data,
  output logic [$clog2(2*N_FFT)-1:0]  out_pos,
  output logic                        out_last
);

  localparam int unsigned N_WORDS = 2 * (N_FFT + N_CP);
  localparam int unsigned CNT_W   = $clog2(N_WORDS);
  localparam int unsigned POS_W   = $clog2(2 * N_FFT);

  logic [CNT_W-1:0] cnt;
  logic [CNT_W-1:0] pos;

  assign pos = in_start ? '0 : cnt;

  always_ff @(posedge clock or negedge arst_n) begin
    if (!arst_n) begin
      cnt       <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
      out_pos   <= '0;
      out_last  <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      if (in_valid) begin
        cnt <= (pos == CNT_W'(N_WORDS - 1)) ? '0 : pos + 1'b1;
        if (pos >= CNT_W'(2 * N_CP)) begin
          out_valid <= 1'b1;
          out_data  <= in_data;
          out_pos   <= POS_W'(pos - CNT_W'(2 * N_CP));
          out_last  <= (pos == CNT_W'(N_WORDS - 1));
        end
      end
    end
  end

endmodule
