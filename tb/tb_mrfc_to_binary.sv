// tb_mrfc_to_binary: checks the weighted-sum decoding of all 16 code words.
// Each 1 digit must add its weight (3, 2, 1, 1 from bit 3 down), so every
// redundant representation of a value decodes to that value.
module tb_mrfc_to_binary;
  import mrfc_pkg::*;

  code_t code;
  data_t data;
  int checks = 0, failures = 0;

  mrfc_to_binary dut (.code(code), .data(data));

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 16; c++) begin
      int exp_v;
      code = code_t'(c);
      #1;
      exp_v = 0;
      if ((c & 8) != 0) exp_v += 3;
      if ((c & 4) != 0) exp_v += 2;
      if ((c & 2) != 0) exp_v += 1;
      if ((c & 1) != 0) exp_v += 1;
      checks++;
      if (int'(data) != exp_v) begin
        failures++;
        $display("code %b: data=%0d expected %0d", code, data, exp_v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
