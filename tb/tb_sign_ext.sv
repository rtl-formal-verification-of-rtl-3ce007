// tb_sign_ext: exhaustive check of the 8-to-16-bit sign extension against
// an arithmetic reference (signed value of the byte).
module tb_sign_ext;
  logic [7:0]  imm;
  logic [15:0] ext;
  int checks = 0, failures = 0;

  sign_ext #(.IW(8), .DW(16)) dut (.imm, .ext);

  initial begin
    for (int i = 0; i < 256; i++) begin
      int signed expv;
      imm = 8'(i);
      #1;
      expv = (i < 128) ? i : i - 256;
      checks++;
      if (int'($signed(ext)) != expv) begin
        failures++;
        $display("FAIL imm=%02h ext=%04h", imm, ext);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
