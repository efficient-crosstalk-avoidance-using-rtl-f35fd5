// mrfc_codec_top: complete MRFC crosstalk-avoidance CODEC, encoder to decoder.
//
// A counter produces the data words 000..111, one per clock. The encoder
// turns each into an MRFC code word, inverts the last two bits of any word
// that would make two adjacent wires switch together with the word before
// it, and gathers eight sent words into a 32-bit frame (`fib_code`). The
// decoder takes that frame, restores the inverted words and returns the
// 24-bit binary frame (`decoded_binary`, slot 0 = data 000 in bits [23:21]).
//
// Timing: the first frame appears on fib_code at the eighth rising edge
// after rst_enc is released (eight words, the last one written straight
// into the frame register) and a new one every eight clocks after;
// decoded_binary follows one clock later, provided rst_dec is low. The
// encoder and the decoder have separate synchronous active-high resets, as
// in the CODEC's own set-up. tx_word is the 4-wire word stream as sent, with
// tx_flip, tx_pairs and tx_residual from the encoder; dec_flipped and
// dec_error are the decoder's per-slot flags.
//
// The counting source, the encoder with transition detector and the
// decoder, and their connection through the 32-bit frame, follow the
// CODEC's definition; the extra status outputs are this design's choice.
module mrfc_codec_top
  import mrfc_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_enc,
  input  logic                    rst_dec,
  output logic [FRAME_CODE_W-1:0] fib_code,
  output logic                    fib_valid,
  output code_t                   tx_word,
  output logic                    tx_flip,
  output logic                    tx_residual,
  output pair_t                   tx_pairs,
  output logic [FRAME_DATA_W-1:0] decoded_binary,
  output logic                    decoded_valid,
  output logic [FRAME_WORDS-1:0]  dec_flipped,
  output logic [FRAME_WORDS-1:0]  dec_error
);

  data_t word;

  data_word_gen u_gen (
    .clk  (clk),
    .rst  (rst_enc),
    .word (word)
  );

  mrfc_codec u_codec (
    .clk         (clk),
    .rst         (rst_enc),
    .din         (word),
    .tx_word     (tx_word),
    .tx_flip     (tx_flip),
    .tx_residual (tx_residual),
    .tx_pairs    (tx_pairs),
    .frame       (fib_code),
    .frame_valid (fib_valid)
  );

  mrfc_decoder u_dec (
    .clk       (clk),
    .rst       (rst_dec),
    .frame_in  (fib_code),
    .in_valid  (fib_valid),
    .data_out  (decoded_binary),
    .flipped   (dec_flipped),
    .error     (dec_error),
    .out_valid (decoded_valid)
  );

endmodule
