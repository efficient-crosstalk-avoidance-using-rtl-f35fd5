// tb_mrfc_decoder: checks frame splitting, flip restoration and decoding.
// Frames are built in the testbench from the MRFC code of each slot's value
// (slot k carries value k), with a random subset of words sent with their
// last two bits inverted; now and then one word is replaced by a word that
// matches its slot neither way. The decoded frame must be 000 001 ... 111
// for every correct slot, the flipped and error flags must match the
// construction, and all outputs must appear one clock after the frame.
module tb_mrfc_decoder;
  import mrfc_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  logic [FRAME_CODE_W-1:0] frame_in;
  logic in_valid;
  logic [FRAME_DATA_W-1:0] data_out;
  logic [FRAME_WORDS-1:0]  flipped, error;
  logic out_valid;
  int checks = 0, failures = 0, n_flip = 0, n_err = 0;

  const code_t table_c [8] = '{4'b0000, 4'b0001, 4'b0011, 4'b0110,
                               4'b0111, 4'b1100, 4'b1101, 4'b1111};

  mrfc_decoder dut (.clk(clk), .rst(rst), .frame_in(frame_in),
                    .in_valid(in_valid), .data_out(data_out),
                    .flipped(flipped), .error(error), .out_valid(out_valid));

  always #5 clk = ~clk;

  initial begin
    #50000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    frame_in = '0;
    in_valid = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    for (int n = 0; n < 300; n++) begin
      logic [7:0] fmask, emask;
      logic [23:0] exp_data;
      logic v;
      fmask = 8'($urandom);
      emask = '0;
      exp_data = '0;
      for (int k = 0; k < 8; k++) begin
        automatic code_t w = table_c[k];
        if (fmask[7-k]) w ^= 4'b0011;
        frame_in[31 - 4*k -: 4] = w;
        exp_data[23 - 3*k -: 3] = 3'(k);
      end
      if (n % 4 == 3) begin
        automatic int k = $urandom_range(0, 7);
        code_t bad;
        do bad = code_t'($urandom);
        while (bad == table_c[k] || bad == (table_c[k] ^ 4'b0011));
        frame_in[31 - 4*k -: 4] = bad;
        emask[7-k] = 1'b1;
        fmask[7-k] = 1'b0;
      end
      v = n[0];
      in_valid = v;
      @(posedge clk); #1;
      checks++;
      if (out_valid !== v || flipped !== fmask || error !== emask) begin
        failures++;
        $display("frame %0d: valid=%b flipped=%b error=%b expected %b %b",
                 n, out_valid, flipped, error, fmask, emask);
      end
      for (int k = 0; k < 8; k++)
        if (!emask[7-k]) begin
          checks++;
          if (data_out[23 - 3*k -: 3] !== 3'(k)) begin
            failures++;
            $display("frame %0d slot %0d: %0d", n, k, data_out[23 - 3*k -: 3]);
          end
        end
      if (emask == 0) begin
        checks++;
        if (data_out !== 24'h05_3977) begin
          failures++;
          $display("frame %0d: data %h", n, data_out);
        end
      end
      n_flip += $countones(fmask);
      n_err  += $countones(emask);
    end
    $display("restored words=%0d error words=%0d", n_flip, n_err);
    checks++;
    if (n_flip == 0 || n_err == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
