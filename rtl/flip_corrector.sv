// flip_corrector: restores a code word that the encoder may have inverted.
//
// The encoder inverts the last two bits of a code word when sending it as is
// would make two adjacent wires switch together. The inverted word carries
// no marker, so the receiver compares the received word with the original
// code word expected in its slot (`ref_word`). Equal: the word is passed on.
// Different: its last two bits are flipped back and the result compared with
// the original once more. If it still differs, `error` is raised and the
// received word is passed on unchanged. Purely combinational.
//
// Comparing with the original word and re-inverting the last two bits follow
// the CODEC's receive rule; the error flag, used instead of looping again,
// is this design's choice.
module flip_corrector
  import mrfc_pkg::*;
(
  input  code_t rx_word,
  input  code_t ref_word,
  output code_t word,     // restored code word
  output logic  flipped,  // the received word had been inverted
  output logic  error     // neither the word nor its inversion matches
);

  code_t unflipped;

  always_comb begin
    unflipped = rx_word ^ FLIP_MASK;
    flipped   = 1'b0;
    error     = 1'b0;
    word      = rx_word;
    if (rx_word != ref_word) begin
      if (unflipped == ref_word) begin
        word    = unflipped;
        flipped = 1'b1;
      end else begin
        error   = 1'b1;
      end
    end
  end

endmodule
