// tb_ofdm_transmitter: feeds random nibbles through a show-ahead FIFO model
// and collects the 20-word symbols. Each symbol is compared with a
// floating-point model: 16-QAM point S on bins 2..5, inverse DFT divided by
// 8, last two samples copied in front, real part then imaginary part.
// Also checks that prefix words equal the tail words exactly, start_output,
// the 9-clock latency from readreq to the first word and the 29-clock symbol
// period while the FIFO never runs dry, and that wrfull holds the output.
// Inputs change on the falling clock edge; outputs are sampled 1 ns later.
module tb_ofdm_transmitter;
  import ofdm_pkg::*;

  localparam real PI = 3.14159265358979323846;
  localparam int NSYM = 60;

  logic clock = 1'b0, arst_n = 1'b0;
  logic [3:0] in_data = '0;
  logic readempty = 1'b1, readreq, wrfull = 1'b0;
  sample_t out_data;
  logic out_valid, start_output;
  int checks = 0, failures = 0;
  int stall_cycles = 0, empty_cycles = 0;

  ofdm_transmitter dut (.*);

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

  // expected word w (0..19) of the symbol carrying nibble d
  function automatic real expected_word(input logic [3:0] d, input int w);
    int j, n;
    real acc;
    j = w / 2;
    n = (j < 2) ? j + 6 : j - 2;
    acc = 0.0;
    for (int k = 2; k <= 5; k++) begin
      if (w % 2 == 0) acc += level(d[3:2]) * $cos(2.0 * PI * k * n / 8.0) - level(d[1:0]) * $sin(2.0 * PI * k * n / 8.0);
      else            acc += level(d[3:2]) * $sin(2.0 * PI * k * n / 8.0) + level(d[1:0]) * $cos(2.0 * PI * k * n / 8.0);
    end
    return acc / 8.0;
  endfunction

  logic [3:0] fifo [$];
  logic [3:0] sent [$];
  int         pop_cycle [$];

  initial begin
    logic [3:0] nib;
    sample_t words [20];
    int nword = 0, nsym = 0, cyc = 0, prev_pop = -1, nerr, npop = 0;
    real e;
    for (int i = 0; i < NSYM; i++) fifo.push_back((i < 16) ? 4'(i) : 4'($urandom));
    repeat (2) @(negedge clock);
    arst_n = 1'b1;
    while (nsym < NSYM) begin
      @(negedge clock);
      cyc++;
      // symbols 0..11: FIFO always full, no back-pressure; then random both
      wrfull    = (nsym >= 12) && ($urandom_range(3) == 0);
      readempty = (fifo.size() == 0) || ((nsym >= 12) && ($urandom_range(4) == 0));
      in_data   = (fifo.size() != 0) ? fifo[0] : 4'($urandom);
      #1;
      if (readempty) empty_cycles++;
      if (wrfull) stall_cycles++;
      if (readreq) begin
        nib = fifo.pop_front();
        sent.push_back(nib);
        npop++;
        if (prev_pop >= 0 && npop <= 12) begin
          checks++;
          if (cyc - prev_pop != 29) begin
            failures++;
            $display("symbol period %0d, expected 29", cyc - prev_pop);
          end
        end
        prev_pop = cyc;
        pop_cycle.push_back(cyc);
      end
      if (wrfull && out_valid) begin
        failures++;
        $display("word sent while wrfull");
      end
      if (out_valid) begin
        checks++;
        if (start_output != (nword == 0)) begin
          failures++;
          $display("start_output %0b on word %0d", start_output, nword);
        end
        if (nword == 0 && nsym < 12) begin
          checks++;
          if (cyc - pop_cycle[0] != 9) begin
            failures++;
            $display("latency %0d, expected 9", cyc - pop_cycle[0]);
          end
        end
        words[nword] = out_data;
        nword++;
        if (nword == 20) begin
          nib = sent.pop_front();
          void'(pop_cycle.pop_front());
          nerr = 0;
          for (int w = 0; w < 20; w++) begin
            e = expected_word(nib, w);
            checks++;
            if (real'(words[w]) - e > 3.0 || e - real'(words[w]) > 3.0) begin
              failures++;
              nerr++;
              if (nerr < 4) $display("symbol %0d (nibble %h) word %0d: %0d expected %f", nsym, nib, w, words[w], e);
            end
          end
          for (int w = 0; w < 4; w++) begin
            checks++;
            if (words[w] != words[w + 16]) begin
              failures++;
              $display("prefix word %0d differs from tail", w);
            end
          end
          nword = 0;
          nsym++;
        end
      end
    end
    checks++;
    if (stall_cycles == 0 || empty_cycles == 0) begin
      failures++;
      $display("wrfull or readempty never exercised");
    end
    $display("symbols %0d, wrfull cycles %0d, readempty cycles %0d", nsym, stall_cycles, empty_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
