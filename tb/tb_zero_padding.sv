// tb_zero_padding: random data bins; bins 0,1,6,7 must be zero and bins 2..5
// must carry the four inputs in order, one clock after in_valid.
module tb_zero_padding;
  import ofdm_pkg::*;

  logic clock = 1'b0, arst_n = 1'b0;
  logic in_valid = 1'b0;
  sample_t in_i [4], in_q [4];
  logic out_valid;
  sample_t out_i [8], out_q [8];
  int checks = 0, failures = 0;

  zero_padding dut (.*);

  always #5 clock = ~clock;

  initial begin
    repeat (500) @(posedge clock);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sample_t ei [4], eq [4];
    sample_t xi, xq;
    for (int k = 0; k < 4; k++) begin
      in_i[k] = '0;
      in_q[k] = '0;
    end
    repeat (2) @(posedge clock);
    arst_n = 1'b1;
    for (int t = 0; t < 40; t++) begin
      for (int k = 0; k < 4; k++) begin
        ei[k] = sample_t'($urandom | 1);
        eq[k] = sample_t'($urandom | 1);
        in_i[k] <= ei[k];
        in_q[k] <= eq[k];
      end
      in_valid <= 1'b1;
      @(posedge clock);
      in_valid <= 1'b0;
      #1;
      checks++;
      if (!out_valid) begin
        failures++;
        $display("no out_valid");
      end
      for (int b = 0; b < 8; b++) begin
        xi = (b >= 2 && b <= 5) ? ei[b - 2] : '0;
        xq = (b >= 2 && b <= 5) ? eq[b - 2] : '0;
        checks++;
        if (out_i[b] != xi || out_q[b] != xq) begin
          failures++;
          $display("bin %0d: %0d/%0d expected %0d/%0d", b, out_i[b], out_q[b], xi, xq);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
