// mrfc_encoder: 3-bit data word to 4-bit Modified Redundant Fibonacci code.
//
// The code word's digits weigh 3, 2, 1, 1, so most values have several
// representations; the MRFC picks one per value:
//
//   data  000  001  010  011  100  101  110  111
//   code 0000 0001 0011 0110 0111 1100 1101 1111
//
// The mapping is a fixed table and is purely combinational: `code` follows
// `data` in the same cycle. The table is the MRFC definition; building it as
// a combinational lookup and leaving registers to the user of the block are
// this design's choices.
module mrfc_encoder
  import mrfc_pkg::*;
(
  input  data_t data,
  output code_t code
);

  always_comb begin
    unique case (data)
      3'd0: code = 4'b0000;
      3'd1: code = 4'b0001;
      3'd2: code = 4'b0011;
      3'd3: code = 4'b0110;
      3'd4: code = 4'b0111;
      3'd5: code = 4'b1100;
      3'd6: code = 4'b1101;
      3'd7: code = 4'b1111;
      default: code = 4'b0000;
    endcase
  end

endmodule
