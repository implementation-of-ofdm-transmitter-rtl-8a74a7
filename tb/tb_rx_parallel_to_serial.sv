// tb_rx_parallel_to_serial: random 8-bin vectors; bins 2..5 must come out in
// order with indices 0..3 on the 4 clocks after in_valid, and nothing else.
module tb_rx_parallel_to_serial;
  import ofdm_pkg::*;

  logic clock = 1'b0, arst_n = 1'b0;
  logic in_valid = 1'b0;
  cplx_t in_data [8];
  logic out_valid;
  cplx_t out_data;
  logic [1:0] out_index;
  int checks = 0, failures = 0;

  rx_parallel_to_serial dut (.*);

  always #5 clock = ~clock;

  initial begin
    repeat (5000) @(posedge clock);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cplx_t v [8];
    for (int n = 0; n < 8; n++) in_data[n] = '0;
    repeat (2) @(negedge clock);
    arst_n = 1'b1;
    for (int s = 0; s < 40; s++) begin
      for (int n = 0; n < 8; n++) begin
        v[n] = cplx_t'($urandom);
        in_data[n] = v[n];
      end
      in_valid = 1'b1;
      @(negedge clock);
      in_valid = 1'b0;
      for (int n = 0; n < 8; n++) in_data[n] = cplx_t'($urandom);
      for (int k = 0; k < 4; k++) begin
        #1;
        checks++;
        if (!out_valid || out_data != v[2 + k] || out_index != 2'(k)) begin
          failures++;
          $display("clock %0d: valid %0b index %0d data %h expected %h", k, out_valid, out_index,
                   out_data, v[2 + k]);
        end
        @(negedge clock);
      end
      repeat ($urandom_range(3)) begin
        #1;
        checks++;
        if (out_valid) begin
          failures++;
          $display("extra output");
        end
        @(negedge clock);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
