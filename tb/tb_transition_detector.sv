// tb_transition_detector: exhaustive check of the adjacent-switching flags.
// For all 256 pairs of 4-bit words the flag of wire pair (i, i+1) must be
// set exactly when both wires change value, and xtalk when any flag is set.
// The paper's example 0111 -> 1100 (wires 1 and 0 both fall) is included.
module tb_transition_detector;
  import mrfc_pkg::*;

  code_t prev_word, next_word;
  pair_t pair_sw;
  logic  xtalk;
  int checks = 0, failures = 0;

  transition_detector dut (.prev_word(prev_word), .next_word(next_word),
                           .pair_sw(pair_sw), .xtalk(xtalk));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 16; a++)
      for (int b = 0; b < 16; b++) begin
        pair_t exp_pairs;
        prev_word = code_t'(a);
        next_word = code_t'(b);
        #1;
        for (int i = 0; i < 3; i++)
          exp_pairs[i] = (prev_word[i] != next_word[i]) &&
                         (prev_word[i+1] != next_word[i+1]);
        checks++;
        if (pair_sw !== exp_pairs || xtalk !== (exp_pairs != 0)) begin
          failures++;
          $display("%b -> %b: pairs=%b xtalk=%b expected %b", prev_word,
                   next_word, pair_sw, xtalk, exp_pairs);
        end
      end
    prev_word = 4'b0111;
    next_word = 4'b1100;
    #1;
    checks++;
    if (pair_sw !== 3'b001 || !xtalk) begin
      failures++;
      $display("0111 -> 1100 not flagged on wires 1,0");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
