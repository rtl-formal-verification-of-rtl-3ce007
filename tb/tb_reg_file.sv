// tb_reg_file: four-register file - separate read (reg_sel) and write
// (ld_sel) selects, write enable, port b always T, reset to zero.
module tb_reg_file;
  logic        clk = 0, rst_n = 0, reg_load = 0;
  logic [1:0]  reg_sel = 0, ld_sel = 0;
  logic [15:0] wdata = 0, a_out, b_out;
  logic [15:0] model [4];
  int checks = 0, failures = 0;

  reg_file #(.DW(16)) dut (.clk, .rst_n, .reg_sel, .ld_sel, .reg_load, .wdata, .a_out, .b_out);

  always #5 clk = ~clk;

  initial begin
    foreach (model[i]) model[i] = '0;
    #12;
    for (int i = 0; i < 4; i++) begin
      reg_sel = 2'(i); #1;
      checks++; if (a_out !== 16'h0) begin failures++; $display("FAIL reset r%0d", i); end
    end
    rst_n = 1;
    for (int i = 0; i < 600; i++) begin
      @(negedge clk);
      reg_load = 1'($urandom);
      reg_sel  = 2'($urandom);
      ld_sel   = 2'($urandom);
      wdata    = 16'($urandom);
      #1;
      checks++;
      if (a_out !== model[reg_sel] || b_out !== model[2]) begin
        failures++;
        $display("FAIL read sel=%0d a=%04h b=%04h exp %04h %04h", reg_sel, a_out, b_out, model[reg_sel], model[2]);
      end
      @(posedge clk);
      if (reg_load) model[ld_sel] = wdata;
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
