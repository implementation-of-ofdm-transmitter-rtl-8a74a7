// tb_ofdm_transceiver: end-to-end test of the transmitter-receiver loopback
// at the default sizes (8-point symbols, 2-sample prefix, 16-bit words).
// Random nibbles go in through a show-ahead FIFO model; every recovered
// data sub-carrier must equal the nibble's 16-QAM point within 8 LSB, in
// order, with indices 0..3. The bench also checks that the prefix words of
// each transmitted symbol equal its last four words, that start_output marks
// the first word, and the timing with no back-pressure: 29 clocks per symbol
// and 34 clocks from readreq to the first recovered sub-carrier.
// It counts how often each mechanism occurred (symbols, prefix checks,
// wrfull holds, idle clocks with an empty FIFO, timed symbols) and fails if
// one never did.
// Inputs change on the falling clock edge; outputs are sampled 1 ns later.
module tb_ofdm_transceiver;
  import ofdm_pkg::*;

  localparam int NSYM = 200;
  localparam int FREE_SYMS = 20;  // symbols sent with a full FIFO and no wrfull

  logic clock = 1'b0, arst_n = 1'b0;
  logic [3:0] in_data = '0;
  logic readempty = 1'b1, readreq, wrfull = 1'b0;
  sample_t tx_data;
  logic tx_valid, start_output;
  sample_t rx_re, rx_im;
  logic rx_valid;
  logic [1:0] rx_index;
  int checks = 0, failures = 0;

  int n_symbols = 0, n_prefix = 0, n_hold = 0, n_empty_idle = 0, n_timed = 0;

  ofdm_transceiver dut (.*);

  always #5 clock = ~clock;

  initial begin
    repeat (40000) @(posedge clock);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int level(input logic [1:0] b);
    int t [4] = '{-3, -1, 3, 1};
    return t[b] * 2048;
  endfunction

  logic [3:0] fifo [$];
  logic [3:0] sent [$];
  int         pop_cycle [$];

  initial begin
    sample_t words [20];
    logic [3:0] d;
    int nword = 0, ntx = 0, cyc = 0, prev_pop = -1, npop = 0, k = 0, er, ei;
    bit idle = 1'b1;
    for (int i = 0; i < NSYM; i++) fifo.push_back((i < 16) ? 4'(i) : 4'($urandom));
    repeat (2) @(negedge clock);
    arst_n = 1'b1;
    while (n_symbols < NSYM) begin
      @(negedge clock);
      cyc++;
      wrfull    = (ntx >= FREE_SYMS) && ($urandom_range(3) == 0);
      readempty = (fifo.size() == 0) || ((ntx >= FREE_SYMS) && ($urandom_range(3) == 0));
      in_data   = (fifo.size() != 0) ? fifo[0] : 4'($urandom);
      #1;
      // transmit side
      if (readempty && idle && fifo.size() != 0) n_empty_idle++;
      if (wrfull && !idle) n_hold++;
      if (readreq) begin
        d = fifo.pop_front();
        sent.push_back(d);
        pop_cycle.push_back(cyc);
        npop++;
        idle = 1'b0;
        if (prev_pop >= 0 && npop <= FREE_SYMS) begin
          checks++;
          if (cyc - prev_pop != 29) begin
            failures++;
            $display("symbol period %0d, expected 29", cyc - prev_pop);
          end
        end
        prev_pop = cyc;
      end
      if (tx_valid) begin
        checks++;
        if (start_output != (nword == 0)) begin
          failures++;
          $display("start_output %0b on word %0d", start_output, nword);
        end
        words[nword] = tx_data;
        nword++;
        if (nword == 20) begin
          for (int w = 0; w < 4; w++) begin
            checks++;
            if (words[w] != words[w + 16]) begin
              failures++;
              $display("prefix word %0d differs from tail", w);
            end
          end
          n_prefix++;
          nword = 0;
          ntx++;
          idle = 1'b1;
        end
      end
      // receive side
      if (rx_valid) begin
        if (sent.size() == 0) begin
          failures++;
          $display("sub-carrier received with no symbol sent");
        end else begin
          d = sent[0];
          if (k == 0 && n_symbols < FREE_SYMS) begin
            checks++;
            n_timed++;
            if (cyc - pop_cycle[0] != 34) begin
              failures++;
              $display("readreq to first sub-carrier %0d clocks, expected 34", cyc - pop_cycle[0]);
            end
          end
          er = int'(rx_re) - level(d[3:2]);
          ei = int'(rx_im) - level(d[1:0]);
          checks++;
          if (rx_index != 2'(k) || er > 8 || er < -8 || ei > 8 || ei < -8) begin
            failures++;
            $display("symbol %0d nibble %h sub-carrier %0d (index %0d): %0d,%0d expected %0d,%0d",
                     n_symbols, d, k, rx_index, rx_re, rx_im, level(d[3:2]), level(d[1:0]));
          end
          k++;
          if (k == 4) begin
            k = 0;
            void'(sent.pop_front());
            void'(pop_cycle.pop_front());
            n_symbols++;
          end
        end
      end
    end
    $display("symbols %0d, prefix checks %0d, wrfull holds %0d, empty-FIFO idles %0d, timed %0d",
             n_symbols, n_prefix, n_hold, n_empty_idle, n_timed);
    checks++;
    if (n_prefix == 0 || n_hold == 0 || n_empty_idle == 0 || n_timed == 0) begin
      failures++;
      $display("a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
