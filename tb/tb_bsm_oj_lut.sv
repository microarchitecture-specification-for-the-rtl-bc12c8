// tb_bsm_oj_lut: exhaustive test of the Oj(1-Oj) table against the product
// Oj*(15-Oj) and against the entries that the design notes list (0, 14, 36,
// 44, 50, 54 and 56 for Oj = 15..8, mirrored).
module tb_bsm_oj_lut;
  logic [3:0] oj;
  logic [5:0] lut;
  int checks = 0, failures = 0;
  int table_vals [16] = '{0, 14, 26, 36, 44, 50, 54, 56, 56, 54, 50, 44, 36, 26, 14, 0};

  bsm_oj_lut dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      oj = 4'(i);
      #1;
      checks++;
      if (int'(lut) != i * (15 - i) || int'(lut) != table_vals[i]) begin
        failures++;
        $display("FAIL: oj=%0d lut=%0d", i, lut);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
