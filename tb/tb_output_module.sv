// tb_output_module: loads random 10-sample symbols and collects the words
// while wrfull is raised at random. Each symbol must come out as 20 words,
// real part then imaginary part of each sample in order, with start_output
// on the first word and done on the last, no word while wrfull is high, and
// 20 clocks per symbol when wrfull stays low.
module tb_output_module;
  import ofdm_pkg::*;

  logic clock = 1'b0, arst_n = 1'b0;
  logic in_valid = 1'b0;
  cplx_t in_data [10];
  logic wrfull = 1'b0;
  sample_t out_data;
  logic out_valid, start_output, done;
  int checks = 0, failures = 0;
  int stalls = 0;

  output_module dut (.*);

  always #5 clock = ~clock;

  initial begin
    repeat (5000) @(posedge clock);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cplx_t s [10];
    sample_t w;
    int got, cycles;
    for (int n = 0; n < 10; n++) in_data[n] = '0;
    repeat (2) @(posedge clock);
    arst_n = 1'b1;
    for (int t = 0; t < 30; t++) begin
      for (int n = 0; n < 10; n++) s[n] = cplx_t'($urandom);
      for (int n = 0; n < 10; n++) in_data[n] <= s[n];
      in_valid <= 1'b1;
      @(posedge clock);
      in_valid <= 1'b0;
      got = 0;
      cycles = 0;
      while (got < 20 && cycles < 200) begin
        // symbols 0..9 run without back-pressure
        #1;
        wrfull = (t >= 10) ? ($urandom_range(2) == 0) : 1'b0;
        #1;
        cycles++;
        if (wrfull) begin
          stalls++;
          checks++;
          if (out_valid) begin
            failures++;
            $display("word sent while wrfull");
          end
        end else begin
          w = got[0] ? s[got >> 1].im : s[got >> 1].re;
          checks++;
          if (!out_valid || out_data != w || start_output != (got == 0) || done != (got == 19)) begin
            failures++;
            $display("symbol %0d word %0d: valid %0b data %0d expected %0d start %0b done %0b",
                     t, got, out_valid, out_data, w, start_output, done);
          end
          got++;
        end
        @(posedge clock);
      end
      wrfull = 1'b0;
      if (t < 10) begin
        checks++;
        if (cycles != 20) begin
          failures++;
          $display("symbol took %0d clocks, expected 20", cycles);
        end
      end
      #1;
      checks++;
      if (out_valid) begin
        failures++;
        $display("extra word after the symbol");
      end
    end
    checks++;
    if (stalls == 0) begin
      failures++;
      $display("wrfull never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
