// tb_data_word_gen: checks the counting data source.
// After reset the source must present 000, 001, ..., 111 on successive
// clocks and wrap to 000; a reset in the middle of a count restarts it.
module tb_data_word_gen;
  import mrfc_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  data_t word;
  int checks = 0, failures = 0;

  data_word_gen dut (.clk(clk), .rst(rst), .word(word));

  always #5 clk = ~clk;

  initial begin
    #2000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    for (int i = 0; i < 20; i++) begin
      checks++;
      if (word !== data_t'(i % 8)) begin
        failures++;
        $display("count %0d: word=%0d expected %0d", i, word, i % 8);
      end
      @(posedge clk); #1;
    end
    rst = 1'b1;
    @(posedge clk); #1;
    rst = 1'b0;
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (word !== data_t'(i)) begin
        failures++;
        $display("after reset %0d: word=%0d", i, word);
      end
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
