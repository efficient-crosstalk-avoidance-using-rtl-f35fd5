// tb_mrfc_codec_top: end-to-end run of the complete CODEC at its default
// sizes. The encoder side is released from reset first while the decoder is
// held in reset, then the decoder is released; 17 frames are observed.
// Checked:
//  - the word stream on the 4 wires: within a frame no two adjacent wires
//    switch together, and 1100 (data 101) is sent inverted as 1111;
//  - every frame is 0000 0001 0011 0110 0111 1111 1101 1111 (0x01367FDF),
//    the first one 8 clocks after the encoder reset ends, then one every
//    8 clocks;
//  - while the decoder is in reset its output stays zero;
//  - one clock after each frame the decoder returns 000 001 ... 111
//    (0x053977) with slot 5 flagged as restored and no error.
// Mechanisms counted (each must occur): encoder inversion, decoder
// restoration, decoder held in reset while frames arrive.
module tb_mrfc_codec_top;
  import mrfc_pkg::*;

  logic clk = 1'b0, rst_enc = 1'b1, rst_dec = 1'b1;
  logic [FRAME_CODE_W-1:0] fib_code;
  logic fib_valid, tx_flip, tx_residual, decoded_valid;
  code_t tx_word;
  pair_t tx_pairs;
  logic [FRAME_DATA_W-1:0] decoded_binary;
  logic [FRAME_WORDS-1:0]  dec_flipped, dec_error;
  int checks = 0, failures = 0;
  int n_inv = 0, n_restore = 0, n_held = 0, n_frames = 0, n_decoded = 0;

  mrfc_codec_top dut (
    .clk(clk), .rst_enc(rst_enc), .rst_dec(rst_dec),
    .fib_code(fib_code), .fib_valid(fib_valid), .tx_word(tx_word),
    .tx_flip(tx_flip), .tx_residual(tx_residual), .tx_pairs(tx_pairs),
    .decoded_binary(decoded_binary), .decoded_valid(decoded_valid),
    .dec_flipped(dec_flipped), .dec_error(dec_error)
  );

  always #5 clk = ~clk;

  initial begin
    #5000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("t=%0t: %s", $time, what);
    end
  endtask

  const code_t sent [8] = '{4'b0000, 4'b0001, 4'b0011, 4'b0110,
                            4'b0111, 4'b1111, 4'b1101, 4'b1111};

  initial begin
    int cyc, last_frame;
    code_t prev;
    repeat (3) @(posedge clk);
    #1 rst_enc = 1'b0;
    cyc = 0;
    last_frame = -1;
    prev = '0;
    for (int c = 1; c <= 16 * 8 + 12; c++) begin
      if (c == 20) rst_dec = 1'b0;
      @(posedge clk); #1;
      cyc = c;
      // word c-1 of the stream, slot (c-1) % 8
      check(tx_word === sent[(c-1) % 8], $sformatf("tx_word %b", tx_word));
      if ((c-1) % 8 != 0) begin
        automatic code_t t = prev ^ tx_word;
        check((t & (t >> 1)) == 0, "adjacent wires switched together");
      end
      check(!tx_residual, "residual clash");
      if (tx_flip) begin
        n_inv++;
        check((c-1) % 8 == 5 && tx_pairs == 3'b001, "unexpected inversion");
      end
      prev = tx_word;
      check(fib_valid === (c >= 8 && c % 8 == 0), "fib_valid timing");
      if (fib_valid) begin
        n_frames++;
        check(fib_code === 32'h0136_7FDF, $sformatf("fib_code %h", fib_code));
        if (last_frame >= 0) check(c - last_frame == 8, "frame period");
        else check(c == 8, "first frame latency (8 words + 1 register)");
        last_frame = c;
      end
      if (rst_dec) begin
        if (c >= 9) n_held++;
      end else if (c > 20) begin
        check(decoded_valid === (c > 8 && c % 8 == 1), "decoded_valid timing");
        if (decoded_valid) begin
          n_decoded++;
          check(decoded_binary === 24'h05_3977,
                $sformatf("decoded %h", decoded_binary));
          check(dec_flipped === 8'b0000_0100 && dec_error === '0,
                $sformatf("flags %b %b", dec_flipped, dec_error));
          if (dec_flipped != 0) n_restore++;
        end
      end
      if (c < 20) check(decoded_binary === '0 && !decoded_valid,
                                     "decoder output while in reset");
    end
    $display("frames=%0d decoded=%0d inversions=%0d restorations=%0d held=%0d",
             n_frames, n_decoded, n_inv, n_restore, n_held);
    check(n_inv > 0,     "no encoder inversion happened");
    check(n_restore > 0, "no decoder restoration happened");
    check(n_held > 0,    "decoder never held in reset during a frame");
    check(n_decoded >= 14, "too few decoded frames");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
