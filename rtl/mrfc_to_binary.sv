// mrfc_to_binary: MRFC code word back to its 3-bit binary value.
//
// Every digit that is 1 adds its Fibonacci weight (3, 2, 1, 1 from the most
// significant digit down) to the result; the sum of all weights is 7, so the
// sum always fits the 3-bit output. Because it only adds weights, the stage
// decodes any of the equivalent representations of a value, not only the
// one the encoder chose. The weighted sum is the MRFC decoding rule; the
// combinational form is this design's choice.
module mrfc_to_binary
  import mrfc_pkg::*;
(
  input  code_t code,
  output data_t data
);

  always_comb begin
    data = '0;
    for (int k = 0; k < CODE_W; k++)
      if (code[k]) data = data + data_t'(WEIGHTS[2*k +: 2]);
  end

endmodule
