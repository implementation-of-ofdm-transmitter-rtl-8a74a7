// tb_cyclic_prefix: random 8-sample symbols; the 10-sample output must start
// with copies of samples 6 and 7 followed by samples 0..7, one clock after
// in_valid.
module tb_cyclic_prefix;
  import ofdm_pkg::*;

  logic clock = 1'b0, arst_n = 1'b0;
  logic in_valid = 1'b0;
  cplx_t in_data [8];
  logic out_valid;
  cplx_t out_data [10];
  int checks = 0, failures = 0;

  cyclic_prefix dut (.*);

  always #5 clock = ~clock;

  initial begin
    repeat (500) @(posedge clock);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cplx_t s [8];
    cplx_t expect_s [10];
    for (int n = 0; n < 8; n++) in_data[n] = '0;
    repeat (2) @(posedge clock);
    arst_n = 1'b1;
    for (int t = 0; t < 40; t++) begin
      for (int n = 0; n < 8; n++) s[n] = cplx_t'($urandom);
      expect_s = '{s[6], s[7], s[0], s[1], s[2], s[3], s[4], s[5], s[6], s[7]};
      for (int n = 0; n < 8; n++) in_data[n] <= s[n];
      in_valid <= 1'b1;
      @(posedge clock);
      in_valid <= 1'b0;
      #1;
      checks++;
      if (!out_valid) begin
        failures++;
        $display("no out_valid");
      end
      for (int j = 0; j < 10; j++) begin
        checks++;
        if (out_data[j] != expect_s[j]) begin
          failures++;
          $display("sample %0d: got %h expected %h", j, out_data[j], expect_s[j]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
