// tb_mux2: random check of the two-input word multiplexer.
module tb_mux2;
  logic [15:0] d0, d1, y;
  logic        sel;
  int checks = 0, failures = 0;

  mux2 #(.DW(16)) dut (.d0, .d1, .sel, .y);

  initial begin
    for (int i = 0; i < 200; i++) begin
      d0 = 16'($urandom); d1 = 16'($urandom); sel = 1'(i);
      #1;
      checks++;
      if (y !== (sel ? d1 : d0)) begin
        failures++;
        $display("FAIL sel=%0b d0=%04h d1=%04h y=%04h", sel, d0, d1, y);
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
