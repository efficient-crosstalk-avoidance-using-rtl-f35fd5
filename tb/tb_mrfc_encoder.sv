// tb_mrfc_encoder: checks the 3-bit to 4-bit MRFC mapping.
// Every data value is compared with the code table of the MRFC and, as an
// independent check, the code's digit weights (3, 2, 1, 1) must add up to
// the data value.
module tb_mrfc_encoder;
  import mrfc_pkg::*;

  data_t data;
  code_t code;
  int checks = 0, failures = 0;
  const code_t expected [8] = '{4'b0000, 4'b0001, 4'b0011, 4'b0110,
                                4'b0111, 4'b1100, 4'b1101, 4'b1111};

  mrfc_encoder dut (.data(data), .code(code));

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      int sum;
      data = data_t'(v);
      #1;
      checks++;
      if (code !== expected[v]) begin
        failures++;
        $display("data %0d: code=%b expected %b", v, code, expected[v]);
      end
      sum = 3 * code[3] + 2 * code[2] + code[1] + code[0];
      checks++;
      if (sum != v) begin
        failures++;
        $display("data %0d: code %b weighs %0d", v, code, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
