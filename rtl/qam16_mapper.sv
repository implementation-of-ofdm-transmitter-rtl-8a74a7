// qam16_mapper: 16-QAM constellation mapper of the OFDM transmitter.
//
// A 4-bit input nibble selects one point of a Gray-coded 16-QAM
// constellation. Bits [3:2] choose the in-phase level and bits [1:0] the
// quadrature level (00 -> -3, 01 -> -1, 11 -> +1, 10 -> +3, times UNIT).
// The 4-bit input and the 16-bit in-phase / quadrature outputs follow the
// design description; the Gray code, the bit order and UNIT are this
// implementation's choices.
//
// Timing: registered, out_valid follows in_valid by one clock.
module qam16_mapper
  import ofdm_pkg::*;
#(
  parameter int UNIT = QAM_UNIT
) (
  input  logic       clock,
  input  logic       arst_n,
  input  logic       in_valid,
  input  logic [3:0] in_bits,
  output logic       out_valid,
  output sample_t    out_i,
  output sample_t    out_q
);

  always_ff @(posedge clock or negedge arst_n) begin
    if (!arst_n) begin
      out_valid <= 1'b0;
      out_i     <= '0;
      out_q     <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_i <= qam_level(in_bits[3:2], UNIT);
        out_q <= qam_level(in_bits[1:0], UNIT);
      end
    end
  end

endmodule
