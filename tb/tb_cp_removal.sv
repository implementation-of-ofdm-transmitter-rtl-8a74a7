// tb_cp_removal: streams 20-word symbols with random gaps. Only words 4..19
// of each symbol may come out, with positions 0..15 and out_last on the
// last. One symbol is cut short; in_start on the next one must re-align.
// Inputs change on the falling edge; outputs are sampled just after it.
module tb_cp_removal;
  import ofdm_pkg::*;

  logic clock = 1'b0, arst_n = 1'b0;
  logic in_valid = 1'b0, in_start = 1'b0;
  sample_t in_data = '0;
  logic out_valid, out_last;
  sample_t out_data;
  logic [3:0] out_pos;
  int checks = 0, failures = 0;

  cp_removal dut (.*);

  always #5 clock = ~clock;

  initial begin
    repeat (5000) @(posedge clock);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected output queue: {data, pos, last}
  sample_t exp_d [$];
  int      exp_p [$];
  bit      exp_l [$];
  int      realigned = 0;

  task automatic send_word(input int sym, input int w, input bit start);
    while ($urandom_range(3) == 0) begin
      in_valid = 1'b0;
      in_start = 1'b0;
      @(negedge clock);
    end
    in_valid = 1'b1;
    in_start = start;
    in_data  = sample_t'((sym << 8) | w);
    if (w >= 4) begin
      exp_d.push_back(in_data);
      exp_p.push_back(w - 4);
      exp_l.push_back(w == 19);
    end
    @(negedge clock);
    in_valid = 1'b0;
    in_start = 1'b0;
  endtask

  initial begin
    repeat (2) @(negedge clock);
    arst_n = 1'b1;
    for (int s = 0; s < 40; s++) begin
      if (s == 20) begin
        // a symbol cut short after 9 words: nothing of it beyond word 8 is expected
        for (int w = 0; w < 9; w++) send_word(s, w, w == 0);
        realigned++;
        continue;
      end
      for (int w = 0; w < 20; w++) send_word(s, w, w == 0);
    end
    repeat (3) @(negedge clock);
    checks++;
    if (exp_d.size() != 0) begin
      failures++;
      $display("%0d words missing", exp_d.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clock) begin
    #1;
    if (out_valid) begin
      checks++;
      if (exp_d.size() == 0) begin
        failures++;
        $display("unexpected word %h", out_data);
      end else begin
        if (out_data != exp_d[0] || out_pos != 4'(exp_p[0]) || out_last != exp_l[0]) begin
          failures++;
          $display("got %h pos %0d last %0b expected %h pos %0d last %0b", out_data, out_pos,
                   out_last, exp_d[0], exp_p[0], exp_l[0]);
        end
        void'(exp_d.pop_front());
        void'(exp_p.pop_front());
        void'(exp_l.pop_front());
      end
    end
  end
endmodule
