// tb_pc_reg: program counter - reset value, load when pc_ld is high, hold
// otherwise.
module tb_pc_reg;
  logic        clk = 0, rst_n = 0, pc_ld = 0;
  logic [15:0] next_pc_1 = 0, pc_out, expv;
  int checks = 0, failures = 0;

  pc_reg #(.DW(16)) dut (.clk, .rst_n, .pc_ld, .next_pc_1, .pc_out);

  always #5 clk = ~clk;

  initial begin
    #12;
    checks++;
    if (pc_out !== 16'h0000) begin failures++; $display("FAIL reset pc=%04h", pc_out); end
    rst_n = 1;
    expv  = 16'h0000;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      pc_ld     = 1'($urandom);
      next_pc_1 = 16'($urandom);
      @(posedge clk); #1;
      if (pc_ld) expv = next_pc_1;
      checks++;
      if (pc_out !== expv) begin
        failures++;
        $display("FAIL ld=%0b pc=%04h exp=%04h", pc_ld, pc_out, expv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
