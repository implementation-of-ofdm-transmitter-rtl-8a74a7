// symbol_generator: repeats one QAM point over N_REP sub-carriers.
//
// Each 16-bit component of the QAM point is concatenated N_REP times
// (4 x 16 = 64 bits per component by default), so the same point is carried
// on N_REP adjacent frequency bins. The repetition count follows the design
// description; registering the result is this implementation's choice.
//
// Interface: out_i[k] / out_q[k], k = 0..N_REP-1, all equal to the input
// component. Timing: out_valid follows in_valid by one clock.
module symbol_generator
  import ofdm_pkg::*;
#(
  parameter int unsigned N_REP = ofdm_pkg::OFDM_N_REP
) (
  input  logic    clock,
  input  logic    arst_n,
  input  logic    in_valid,
  input  sample_t in_i,
  input  sample_t in_q,
  output logic    out_valid,
  output sample_t out_i [N_REP],
  output sample_t out_q [N_REP]
);

  always_ff @(posedge clock or negedge arst_n) begin
    if (!arst_n) begin
      out_valid <= 1'b0;
      for (int k = 0; k < int'(N_REP); k++) begin
        out_i[k] <= '0;
        out_q[k] <= '0;
      end
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        for (int k = 0; k < int'(N_REP); k++) begin
          out_i[k] <= in_i;
          out_q[k] <= in_q;
        end
      end
    end
  end

endmodule
