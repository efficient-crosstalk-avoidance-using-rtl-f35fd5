// tb_flip_corrector: exhaustive check of the receive-side flip restoration.
// For every received word and every original word: equal words pass with no
// flag; a word that equals the original with its last two bits inverted is
// restored and flagged as flipped; anything else is flagged as an error and
// passed unchanged.
module tb_flip_corrector;
  import mrfc_pkg::*;

  code_t rx_word, ref_word, word;
  logic  flipped, error;
  int checks = 0, failures = 0;
  int n_flipped = 0, n_error = 0;

  flip_corrector dut (.rx_word(rx_word), .ref_word(ref_word), .word(word),
                      .flipped(flipped), .error(error));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 16; r++)
      for (int o = 0; o < 16; o++) begin
        code_t exp_w;
        logic  exp_f, exp_e;
        rx_word  = code_t'(r);
        ref_word = code_t'(o);
        #1;
        exp_w = rx_word; exp_f = 1'b0; exp_e = 1'b0;
        if (r == o) ;
        else if ({rx_word[3:2], ~rx_word[1], ~rx_word[0]} == ref_word) begin
          exp_w = ref_word; exp_f = 1'b1;
        end else exp_e = 1'b1;
        checks++;
        if (word !== exp_w || flipped !== exp_f || error !== exp_e) begin
          failures++;
          $display("rx %b ref %b: word=%b f=%b e=%b", rx_word, ref_word,
                   word, flipped, error);
        end
        n_flipped += int'(flipped);
        n_error   += int'(error);
      end
    checks++;
    if (n_flipped != 16 || n_error != 16 * 14) begin
      failures++;
      $display("flag counts %0d / %0d", n_flipped, n_error);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
