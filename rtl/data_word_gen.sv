// data_word_gen: source of the data words carried by the CODEC.
//
// A free-running counter that presents the data words 000, 001, ..., 111 in
// order, one per clock, and starts again at 000. Because one frame holds
// exactly the eight data values, the count is also the word's slot in the
// frame, so one register serves as both (slot 0 carries 000).
//
// Interface: synchronous active-high reset clears the count; `word` changes
// on every rising clock edge after reset is released. The counting source
// follows the CODEC's own test set-up, where the data is generated inside
// the encoder; its width and reset behaviour are this design's choice.
module data_word_gen
  import mrfc_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  output data_t word
);

  always_ff @(posedge clk) begin
    if (rst) word <= '0;
    else     word <= word + 1'b1;
  end

endmodule
