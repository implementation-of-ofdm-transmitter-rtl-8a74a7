// tb_tx_ifft: random in-phase and quadrature bin vectors; the output must be
// the inverse DFT of the complex bins I + jQ, divided by 8, computed here in
// floating point. Also checks the 4-clock latency.
module tb_tx_ifft;
  import ofdm_pkg::*;

  localparam real PI = 3.14159265358979323846;

  logic clock = 1'b0, arst_n = 1'b0;
  logic in_valid = 1'b0;
  sample_t in_i [8], in_q [8];
  logic out_valid;
  cplx_t out_data [8];
  int checks = 0, failures = 0;

  tx_ifft dut (.*);

  always #5 clock = ~clock;

  initial begin
    repeat (2000) @(posedge clock);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sample_t bi [8], bq [8];
    real er, ei, ang;
    int dr, di, lat;
    for (int k = 0; k < 8; k++) begin
      in_i[k] = '0;
      in_q[k] = '0;
    end
    repeat (2) @(posedge clock);
    arst_n = 1'b1;
    for (int t = 0; t < 60; t++) begin
      for (int k = 0; k < 8; k++) begin
        bi[k] = sample_t'(int'($urandom_range(16000)) - 8000);
        bq[k] = sample_t'(int'($urandom_range(16000)) - 8000);
      end
      for (int k = 0; k < 8; k++) in_i[k] <= bi[k];
      for (int k = 0; k < 8; k++) in_q[k] <= bq[k];
      in_valid <= 1'b1;
      @(posedge clock);
      in_valid <= 1'b0;
      lat = 0;
      do begin
        #1;
        lat++;
        if (!out_valid) @(posedge clock);
      end while (!out_valid && lat < 20);
      checks++;
      if (lat != 4) begin
        failures++;
        $display("latency %0d, expected 4", lat);
      end
      for (int n = 0; n < 8; n++) begin
        er = 0.0;
        ei = 0.0;
        for (int k = 0; k < 8; k++) begin
          ang = 2.0 * PI * k * n / 8.0;
          er += real'(bi[k]) * $cos(ang) - real'(bq[k]) * $sin(ang);
          ei += real'(bi[k]) * $sin(ang) + real'(bq[k]) * $cos(ang);
        end
        er /= 8.0;
        ei /= 8.0;
        dr = int'(out_data[n].re) - $rtoi(er + (er >= 0 ? 0.5 : -0.5));
        di = int'(out_data[n].im) - $rtoi(ei + (ei >= 0 ? 0.5 : -0.5));
        checks++;
        if (dr > 3 || dr < -3 || di > 3 || di < -3) begin
          failures++;
          $display("sample %0d: got %0d,%0d expected %f,%f", n, out_data[n].re, out_data[n].im, er, ei);
        end
      end
      @(posedge clock);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
