// tb_control_unit: readreq must rise only while idle with data waiting, pop
// exactly once per symbol, and stay low until symbol_done.
module tb_control_unit;
  logic clock = 1'b0, arst_n = 1'b0;
  logic readempty = 1'b1, symbol_done = 1'b0;
  logic readreq, busy;
  int checks = 0, failures = 0;

  control_unit dut (.*);

  always #5 clock = ~clock;

  initial begin
    repeat (2000) @(negedge clock);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int wait_n, hold_n;
    repeat (2) @(negedge clock);
    arst_n = 1'b1;
    // idle and empty: no pop
    repeat (3) begin
      #1;
      checks++;
      if (readreq || busy) begin
        failures++;
        $display("pop from an empty FIFO");
      end
      @(negedge clock);
    end
    for (int t = 0; t < 40; t++) begin
      wait_n = $urandom_range(3);
      readempty = 1'b1;
      repeat (wait_n) @(negedge clock);
      readempty = 1'b0;
      #1;
      checks++;
      if (!readreq) begin
        failures++;
        $display("no pop while idle with data");
      end
      @(negedge clock);
      hold_n = 1 + $urandom_range(10);
      for (int c = 0; c < hold_n; c++) begin
        #1;
        checks++;
        if (readreq || !busy) begin
          failures++;
          $display("pop while a symbol is in flight");
        end
        @(negedge clock);
      end
      symbol_done = 1'b1;
      #1;
      checks++;
      if (readreq) begin
        failures++;
        $display("pop in the clock of symbol_done");
      end
      @(negedge clock);
      symbol_done = 1'b0;
      #1;
      checks++;
      if (busy) begin
        failures++;
        $display("still busy after symbol_done");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
