// tb_fft8: drives a forward and an inverse fft8 with random complex vectors,
// back to back (one per clock), and compares every bin with a DFT computed
// in floating point: X[k] = sum x[n] exp(-j 2 pi k n / 8) for the FFT and
// x[n] = 1/8 sum X[k] exp(+j 2 pi k n / 8) for the IFFT. Also checks the
// 3-clock latency and that the pipeline takes a new vector every clock.
module tb_fft8;
  import ofdm_pkg::*;

  localparam int NVEC = 64;
  localparam real PI = 3.14159265358979323846;

  logic clock = 1'b0, arst_n = 1'b0;
  logic in_valid = 1'b0;
  cplx_t in_data [8];
  logic fwd_valid, inv_valid;
  cplx_t fwd_data [8], inv_data [8];
  int checks = 0, failures = 0;
  int max_err = 0;

  cplx_t vecs [NVEC][8];

  fft8 #(.INVERSE(1'b0)) dut_fwd (.clock, .arst_n, .in_valid, .in_data, .out_valid(fwd_valid), .out_data(fwd_data));
  fft8 #(.INVERSE(1'b1)) dut_inv (.clock, .arst_n, .in_valid, .in_data, .out_valid(inv_valid), .out_data(inv_data));

  always #5 clock = ~clock;

  initial begin
    repeat (1000) @(posedge clock);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int rnd(input int lim);
    return int'($urandom_range(2 * lim)) - lim;
  endfunction

  task automatic compare(input cplx_t x [8], input cplx_t got [8], input bit inverse, input int tol);
    real er, ei, ang;
    int dr, di;
    for (int k = 0; k < 8; k++) begin
      er = 0.0;
      ei = 0.0;
      for (int n = 0; n < 8; n++) begin
        ang = (inverse ? 2.0 : -2.0) * PI * k * n / 8.0;
        er += real'(x[n].re) * $cos(ang) - real'(x[n].im) * $sin(ang);
        ei += real'(x[n].re) * $sin(ang) + real'(x[n].im) * $cos(ang);
      end
      if (inverse) begin
        er /= 8.0;
        ei /= 8.0;
      end
      dr = int'(got[k].re) - $rtoi(er + (er >= 0 ? 0.5 : -0.5));
      di = int'(got[k].im) - $rtoi(ei + (ei >= 0 ? 0.5 : -0.5));
      if (dr < 0) dr = -dr;
      if (di < 0) di = -di;
      if (dr > max_err) max_err = dr;
      if (di > max_err) max_err = di;
      checks++;
      if (dr > tol || di > tol) begin
        failures++;
        $display("%s bin %0d: got %0d,%0d expected %f,%f", inverse ? "ifft" : "fft", k,
                 got[k].re, got[k].im, er, ei);
      end
    end
  endtask

  // input side: NVEC vectors on consecutive clocks
  initial begin
    for (int v = 0; v < NVEC; v++)
      for (int n = 0; n < 8; n++) begin
        // first vectors: an impulse and a constant, then random data
        if (v == 0)      vecs[v][n] = '{re: (n == 0) ? 16'sd1000 : '0, im: '0};
        else if (v == 1) vecs[v][n] = '{re: 16'sd500, im: -16'sd300};
        else             vecs[v][n] = '{re: sample_t'(rnd(4000)), im: sample_t'(rnd(4000))};
      end
    for (int n = 0; n < 8; n++) in_data[n] = '0;
    repeat (2) @(posedge clock);
    arst_n = 1'b1;
    @(posedge clock);
    for (int v = 0; v < NVEC; v++) begin
      in_data  <= vecs[v];
      in_valid <= 1'b1;
      @(posedge clock);
    end
    in_valid <= 1'b0;
  end

  // output side
  initial begin
    int got_vec = 0;
    int cyc = 0;
    int first_in = -1;
    @(posedge arst_n);
    while (got_vec < NVEC) begin
      @(posedge clock);
      #1;
      cyc++;
      if (in_valid && first_in < 0) first_in = cyc;
      if (fwd_valid != inv_valid) begin
        failures++;
        $display("forward and inverse out of step");
      end
      if (fwd_valid) begin
        if (got_vec == 0) begin
          checks++;
          if (cyc - first_in != 3) begin
            failures++;
            $display("latency %0d, expected 3", cyc - first_in);
          end
        end
        compare(vecs[got_vec], fwd_data, 1'b0, 6);
        compare(vecs[got_vec], inv_data, 1'b1, 2);
        got_vec++;
      end else if (got_vec > 0) begin
        failures++;
        $display("gap in output stream after %0d vectors", got_vec);
        got_vec = NVEC;
      end
    end
    $display("largest error %0d LSB", max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
