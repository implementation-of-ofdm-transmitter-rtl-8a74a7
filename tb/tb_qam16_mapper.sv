// tb_qam16_mapper: checks every 4-bit input against an independent 16-QAM
// level table and checks the one-clock latency.
module tb_qam16_mapper;
  import ofdm_pkg::*;

  logic clock = 1'b0, arst_n = 1'b0;
  logic in_valid = 1'b0;
  logic [3:0] in_bits = '0;
  logic out_valid;
  sample_t out_i, out_q;
  int checks = 0, failures = 0;

  // Gray-coded levels indexed by the bit pair: 00, 01, 10, 11
  int lvl [4] = '{-3, -1, 3, 1};

  qam16_mapper dut (.*);

  always #5 clock = ~clock;

  initial begin
    repeat (200) @(posedge clock);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clock);
    arst_n = 1'b1;
    @(posedge clock);
    for (int v = 0; v < 16; v++) begin
      in_bits  <= 4'(v);
      in_valid <= 1'b1;
      @(posedge clock);
      in_valid <= 1'b0;
      #1;
      checks++;
      if (!out_valid || out_i != sample_t'(lvl[v >> 2] * 2048) || out_q != sample_t'(lvl[v & 3] * 2048)) begin
        failures++;
        $display("nibble %h: valid %0b i %0d q %0d", v, out_valid, out_i, out_q);
      end
      @(posedge clock);
      #1;
      checks++;
      if (out_valid) begin
        failures++;
        $display("out_valid held without input");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
