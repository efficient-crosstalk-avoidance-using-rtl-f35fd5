// tb_mrfc_codec: checks the encoder with transition detector, word by word.
// A reference model in the testbench encodes each data word from the MRFC
// table, inverts its last two bits when it and the previous word of the
// frame would switch two adjacent wires together, and collects frames.
// Phase 1 sends the counting sequence 000..111 for three frames; each frame
// must be 0000 0001 0011 0110 0111 1111 1101 1111 (only 1100 is inverted,
// after 0111). Phase 2 sends random words so that clashes on the upper wire
// pairs and the residual case occur. Every cycle tx_word, tx_flip,
// tx_pairs and tx_residual are compared one clock after din; frame and
// frame_valid must come once every eight words.
module tb_mrfc_codec;
  import mrfc_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  data_t din;
  code_t tx_word;
  logic tx_flip, tx_residual, frame_valid;
  pair_t tx_pairs;
  logic [FRAME_CODE_W-1:0] frame;
  int checks = 0, failures = 0;
  int n_flip = 0, n_residual = 0, n_frames = 0, n_upper = 0;

  const code_t table_c [8] = '{4'b0000, 4'b0001, 4'b0011, 4'b0110,
                               4'b0111, 4'b1100, 4'b1101, 4'b1111};

  mrfc_codec dut (.clk(clk), .rst(rst), .din(din), .tx_word(tx_word),
                  .tx_flip(tx_flip), .tx_residual(tx_residual),
                  .tx_pairs(tx_pairs), .frame(frame),
                  .frame_valid(frame_valid));

  always #5 clk = ~clk;

  initial begin
    #20000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic pair_t clash(code_t a, code_t b);
    code_t t = a ^ b;
    return {t[3] & t[2], t[2] & t[1], t[1] & t[0]};
  endfunction

  code_t m_prev;
  logic [31:0] m_frame;
  int cycle;

  task automatic step(data_t d, bit counting);
    code_t enc, snd;
    pair_t p;
    logic f, res;
    int slot = cycle % 8;
    din = d;
    enc = table_c[d];
    p   = clash(m_prev, enc);
    f   = (slot != 0) && (p != 0);
    snd = f ? enc ^ 4'b0011 : enc;
    res = f && (clash(m_prev, snd) != 0);
    m_prev = snd;
    m_frame[31 - 4*slot -: 4] = snd;
    @(posedge clk); #1;
    checks++;
    if (tx_word !== snd || tx_flip !== f || tx_residual !== res ||
        tx_pairs !== (f ? p : 3'b000)) begin
      failures++;
      $display("cycle %0d d=%0d: tx=%b f=%b r=%b p=%b expected %b %b %b %b",
               cycle, d, tx_word, tx_flip, tx_residual, tx_pairs, snd, f, res, p);
    end
    checks++;
    if (frame_valid !== (slot == 7)) begin
      failures++;
      $display("cycle %0d: frame_valid=%b", cycle, frame_valid);
    end
    if (slot == 7) begin
      n_frames++;
      checks++;
      if (frame !== m_frame) begin
        failures++;
        $display("frame %h expected %h", frame, m_frame);
      end
      if (counting) begin
        checks++;
        if (frame !== 32'h0136_7FDF) begin
          failures++;
          $display("counting frame %h", frame);
        end
      end
    end
    n_flip     += int'(f);
    n_residual += int'(res);
    if (f && p[2:1] != 0) n_upper++;
    cycle++;
  endtask

  initial begin
    din = '0;
    m_prev = '0;
    m_frame = '0;
    cycle = 0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    for (int i = 0; i < 24; i++) step(data_t'(i % 8), 1'b1);
    checks++;
    if (n_flip != 3) begin
      failures++;
      $display("counting sequence: %0d inversions, expected 3", n_flip);
    end
    for (int i = 0; i < 800; i++) step(data_t'($urandom_range(0, 7)), 1'b0);
    $display("frames=%0d inversions=%0d upper-pair clashes=%0d residual=%0d",
             n_frames, n_flip, n_upper, n_residual);
    checks++;
    if (n_residual == 0 || n_upper == 0) begin
      failures++;
      $display("random phase did not reach every case");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
