// tb_symbol_generator: random QAM points; each output component must hold
// the input four times, one clock after in_valid.
module tb_symbol_generator;
  import ofdm_pkg::*;

  logic clock = 1'b0, arst_n = 1'b0;
  logic in_valid = 1'b0;
  sample_t in_i = '0, in_q = '0;
  logic out_valid;
  sample_t out_i [4], out_q [4];
  int checks = 0, failures = 0;

  symbol_generator dut (.*);

  always #5 clock = ~clock;

  initial begin
    repeat (500) @(posedge clock);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sample_t ei, eq;
    repeat (2) @(posedge clock);
    arst_n = 1'b1;
    for (int t = 0; t < 50; t++) begin
      ei = sample_t'($urandom);
      eq = sample_t'($urandom);
      in_i <= ei;
      in_q <= eq;
      in_valid <= 1'b1;
      @(posedge clock);
      in_valid <= 1'b0;
      #1;
      checks++;
      if (!out_valid) begin
        failures++;
        $display("no out_valid one clock after in_valid");
      end
      for (int k = 0; k < 4; k++) begin
        checks++;
        if (out_i[k] != ei || out_q[k] != eq) begin
          failures++;
          $display("copy %0d: %0d/%0d expected %0d/%0d", k, out_i[k], out_q[k], ei, eq);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
