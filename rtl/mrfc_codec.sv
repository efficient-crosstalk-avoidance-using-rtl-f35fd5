// mrfc_codec: MRFC encoder with transition detector (transmit side).
//
// One 3-bit data word is taken per clock and encoded to its 4-bit MRFC code
// word. A transition detector compares that word with the word sent before
// it in the same frame. If two adjacent wires would switch together, the
// last two bits of the new word are inverted before it is sent, and a second
// detector checks the inverted word against the same predecessor; the
// inverted word then becomes the predecessor of the next word, so an
// inversion is taken into account by the following comparison. Eight words
// make a frame; the first word of a frame has no predecessor and is always
// sent as encoded.
//
// Interface and timing:
//   din         data word, sampled on every rising edge while rst is low
//   tx_word     the code word sent for the din of the previous cycle
//   tx_flip     tx_word is the encoded word with its last two bits inverted
//   tx_pairs    per adjacent wire pair, both wires would have switched
//               with the word as encoded (the clash that caused tx_flip)
//   tx_residual adjacent wires still switch together after the inversion
//               (inverting the last two bits cannot clear a clash between
//               the two upper wires); the word is sent inverted anyway
//   frame       the eight sent words of the last complete frame, slot 0 in
//               bits [31:28]; updated together with frame_valid
//   frame_valid one-cycle pulse when a new frame is in `frame`
// Reset is synchronous and active high; it clears the slot counter, the
// outputs and the stored frame.
//
// Flipping the last two bits on a detected clash and comparing the next word
// with the already inverted word follow the CODEC's definition. One word per
// clock, the frame-local first comparison, the registered outputs and the
// residual flag are this design's choices.
module mrfc_codec
  import mrfc_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst,
  input  data_t                   din,
  output code_t                   tx_word,
  output logic                    tx_flip,
  output logic                    tx_residual,
  output pair_t                   tx_pairs,
  output logic [FRAME_CODE_W-1:0] frame,
  output logic                    frame_valid
);

  slot_t slot_q;
  code_t prev_q;             // last word sent in this frame
  code_t enc_word, send_word;
  pair_t pair_first;
  logic  clash_raw, clash_after;
  logic  do_flip, residual;
  logic [FRAME_CODE_W-1:0] build_q, build_next;

  mrfc_encoder u_enc (
    .data (din),
    .code (enc_word)
  );

  // Detector on the encoded word.
  transition_detector u_td_first (
    .prev_word (prev_q),
    .next_word (enc_word),
    .pair_sw   (pair_first),
    .xtalk     (clash_raw)
  );

  always_comb begin
    do_flip   = clash_raw && (slot_q != '0);
    send_word = do_flip ? (enc_word ^ FLIP_MASK) : enc_word;
  end

  // Detector on the word actually sent.
  transition_detector u_td_second (
    .prev_word (prev_q),
    .next_word (send_word),
    .pair_sw   (),
    .xtalk     (clash_after)
  );

  always_comb begin
    residual   = do_flip && clash_after;
    build_next = build_q;
    build_next[FRAME_CODE_W-1 - CODE_W*slot_q -: CODE_W] = send_word;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      slot_q      <= '0;
      prev_q      <= '0;
      tx_word     <= '0;
      tx_flip     <= 1'b0;
      tx_residual <= 1'b0;
      tx_pairs    <= '0;
      build_q     <= '0;
      frame       <= '0;
      frame_valid <= 1'b0;
    end else begin
      slot_q      <= slot_q + 1'b1;
      prev_q      <= send_word;
      tx_word     <= send_word;
      tx_flip     <= do_flip;
      tx_residual <= residual;
      tx_pairs    <= do_flip ? pair_first : '0;
      build_q     <= build_next;
      frame_valid <= (slot_q == slot_t'(FRAME_WORDS - 1));
      if (slot_q == slot_t'(FRAME_WORDS - 1))
        frame <= build_next;
    end
  end

  // A frame completes exactly every FRAME_WORDS clocks, and a word that was
  // not inverted never makes adjacent wires switch together inside a frame.
  a_frame_period: assert property (@(posedge clk) disable iff (rst)
    frame_valid |=> !frame_valid [* FRAME_WORDS - 1] ##1 frame_valid);
  a_clean_when_kept: assert property (@(posedge clk) disable iff (rst)
    (slot_q != '0 && !do_flip) |-> !clash_after);

endmodule
