// tb_serial_to_parallel: sends 16 positioned words per symbol with random
// gaps; one clock after the last word out_valid must pulse once and out_data
// must hold all 8 complex samples.
module tb_serial_to_parallel;
  import ofdm_pkg::*;

  logic clock = 1'b0, arst_n = 1'b0;
  logic in_valid = 1'b0, in_last = 1'b0;
  sample_t in_data = '0;
  logic [3:0] in_pos = '0;
  logic out_valid;
  cplx_t out_data [8];
  int checks = 0, failures = 0;

  serial_to_parallel dut (.*);

  always #5 clock = ~clock;

  initial begin
    repeat (5000) @(posedge clock);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sample_t w [16];
    repeat (2) @(negedge clock);
    arst_n = 1'b1;
    for (int s = 0; s < 40; s++) begin
      for (int p = 0; p < 16; p++) begin
        w[p] = sample_t'($urandom);
        while ($urandom_range(2) == 0) begin
          in_valid = 1'b0;
          in_last  = 1'b0;
          @(negedge clock);
          #1;
          checks++;
          if (out_valid) begin
            failures++;
            $display("out_valid before the symbol was complete");
          end
        end
        in_valid = 1'b1;
        in_pos   = 4'(p);
        in_data  = w[p];
        in_last  = (p == 15);
        @(negedge clock);
      end
      in_valid = 1'b0;
      in_last  = 1'b0;
      #1;
      checks++;
      if (!out_valid) begin
        failures++;
        $display("no out_valid after the last word");
      end
      for (int n = 0; n < 8; n++) begin
        checks++;
        if (out_data[n].re != w[2 * n] || out_data[n].im != w[2 * n + 1]) begin
          failures++;
          $display("sample %0d: %0d,%0d expected %0d,%0d", n, out_data[n].re, out_data[n].im,
                   w[2 * n], w[2 * n + 1]);
        end
      end
      @(negedge clock);
      #1;
      checks++;
      if (out_valid) begin
        failures++;
        $display("out_valid longer than one clock");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
