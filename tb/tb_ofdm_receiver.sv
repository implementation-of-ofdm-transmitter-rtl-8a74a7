// tb_ofdm_receiver: builds OFDM symbols in floating point (16-QAM point S
// on bins 2..5, inverse DFT divided by 8, rounded to 16 bits, 2-sample
// cyclic prefix, real then imaginary word), streams them in with random
// gaps and checks that the four outputs per symbol equal S within 8 LSB,
// carry indices 0..3, and that the first one leaves 6 clocks after the last
// word when no gap delays it. The prefix words are replaced by garbage on
// some symbols: the receiver must ignore them.
module tb_ofdm_receiver;
  import ofdm_pkg::*;

  localparam real PI = 3.14159265358979323846;
  localparam int NSYM = 60;

  logic clock = 1'b0, arst_n = 1'b0;
  logic enable = 1'b0, in_start = 1'b0;
  sample_t in_data = '0;
  sample_t out_re, out_im;
  logic out_valid;
  logic [1:0] out_index;
  int checks = 0, failures = 0;

  ofdm_receiver dut (.*);

  always #5 clock = ~clock;

  initial begin
    repeat (20000) @(posedge clock);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int level(input logic [1:0] b);
    int t [4] = '{-3, -1, 3, 1};
    return t[b] * 2048;
  endfunction

  function automatic sample_t tx_word(input logic [3:0] d, input int w);
    int j, n;
    real acc;
    j = w / 2;
    n = (j < 2) ? j + 6 : j - 2;
    acc = 0.0;
    for (int k = 2; k <= 5; k++) begin
      if (w % 2 == 0) acc += level(d[3:2]) * $cos(2.0 * PI * k * n / 8.0) - level(d[1:0]) * $sin(2.0 * PI * k * n / 8.0);
      else            acc += level(d[3:2]) * $sin(2.0 * PI * k * n / 8.0) + level(d[1:0]) * $cos(2.0 * PI * k * n / 8.0);
    end
    acc /= 8.0;
    return sample_t'($rtoi(acc + (acc >= 0 ? 0.5 : -0.5)));
  endfunction

  logic [3:0] sent [$];
  int last_word_cycle [$];
  bit gap_free [$];
  int cyc = 0;

  always @(posedge clock) cyc++;

  initial begin
    logic [3:0] d;
    bit gaps;
    repeat (2) @(negedge clock);
    arst_n = 1'b1;
    for (int s = 0; s < NSYM; s++) begin
      d = (s < 16) ? 4'(s) : 4'($urandom);
      gaps = (s >= 10);
      sent.push_back(d);
      for (int w = 0; w < 20; w++) begin
        while (gaps && $urandom_range(3) == 0) begin
          enable = 1'b0;
          in_start = 1'b0;
          @(negedge clock);
        end
        enable   = 1'b1;
        in_start = (w == 0);
        in_data  = (w < 4 && s % 3 == 2) ? sample_t'($urandom) : tx_word(d, w);
        if (w == 19) begin
          last_word_cycle.push_back(cyc);
          gap_free.push_back(!gaps);
        end
        @(negedge clock);
      end
      enable = 1'b0;
      in_start = 1'b0;
      // idle clocks between symbols, as the transmitter leaves 9
      repeat (gaps ? $urandom_range(9) : 9) @(negedge clock);
    end
    repeat (20) @(negedge clock);
    checks++;
    if (sent.size() != 0) begin
      failures++;
      $display("%0d symbols not received", sent.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int k = 0, er, ei;
    logic [3:0] d;
    forever begin
      @(negedge clock);
      #1;
      if (out_valid) begin
        if (sent.size() == 0) begin
          failures++;
          $display("output without a symbol");
          continue;
        end
        d = sent[0];
        if (k == 0) begin
          checks++;
          if (gap_free[0] && cyc - last_word_cycle[0] != 6) begin
            failures++;
            $display("latency %0d, expected 6", cyc - last_word_cycle[0]);
          end
        end
        er = int'(out_re) - level(d[3:2]);
        ei = int'(out_im) - level(d[1:0]);
        checks++;
        if (out_index != 2'(k) || er > 8 || er < -8 || ei > 8 || ei < -8) begin
          failures++;
          $display("nibble %h bin %0d (index %0d): got %0d,%0d expected %0d,%0d", d, k, out_index,
                   out_re, out_im, level(d[3:2]), level(d[1:0]));
        end
        k++;
        if (k == 4) begin
          k = 0;
          void'(sent.pop_front());
          void'(last_word_cycle.pop_front());
          void'(gap_free.pop_front());
        end
      end
    end
  end
endmodule
