// tb_mad_input_fsm: words arrive at random on the fast clock while the core
// enable toggles every second cycle and allow is dropped at times. Checks that
// every pair of words becomes one operand set, in order, with the first word's
// operands held and the last flag from the second word; that each set is
// offered to exactly one core cycle; and that with a gap-free stream a set is
// ready for every core cycle.
module tb_mad_input_fsm;
  import stap_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, core_ce = 1'b0;
  always #5 clk = ~clk;

  logic          allow, in_valid, in_ready, set_valid, set_last, set_evt;
  in_word_t      in_word;
  operand_pair_t set_p1, set_p2;

  mad_input_fsm dut (.clk, .rst_n, .core_ce, .allow, .in_valid, .in_ready, .in_word,
                     .set_valid, .set_p1, .set_p2, .set_last, .set_evt);

  int checks = 0, failures = 0, n_sets = 0, n_full_rate = 0;
  in_word_t sent[$];
  bit random_mode = 1'b1;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // core side: consume on core_ce, compare with the words sent
  always @(posedge clk) begin
    if (rst_n) begin
      core_ce <= !core_ce;
      if (core_ce && set_valid) begin
        checks++;
        n_sets++;
        if (sent.size() < 2 || set_p1 !== sent[0].pair || set_p2 !== sent[1].pair ||
            set_last !== sent[1].last) begin
          failures++;
          $display("FAIL: set %0d wrong", n_sets);
        end
        if (sent.size() >= 2) begin
          void'(sent.pop_front());
          void'(sent.pop_front());
        end
        if (!random_mode) n_full_rate++;
      end
    end
  end

  initial begin
    in_valid = 0; in_word = '0; allow = 1;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 6000; i++) begin
      @(negedge clk);
      random_mode = (i < 5000);
      allow    = random_mode ? ($urandom_range(0, 7) != 0) : 1'b1;
      in_valid = random_mode ? 1'($urandom) : 1'b1;
      in_word  = in_word_t'({$urandom, $urandom});
      #1;
      if (in_valid && in_ready) sent.push_back(in_word);
    end
    @(negedge clk);
    in_valid = 0;
    repeat (6) @(negedge clk);
    // gap-free stream of 1000 words: one set per core cycle
    checks++;
    if (n_full_rate < 495 || sent.size() > 1) begin
      failures++;
      $display("FAIL: %0d sets at full rate, %0d words left", n_full_rate, sent.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
