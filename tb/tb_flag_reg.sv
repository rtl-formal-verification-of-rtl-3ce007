// tb_flag_reg: carry/zero flag registers - update only when flag_ld and the
// per-flag write enable are both high.
module tb_flag_reg;
  logic clk = 0, rst_n = 0, flag_ld = 0, c_we = 0, z_we = 0, c_in = 0, z_in = 0, c, z;
  logic ec = 0, ez = 0;
  int checks = 0, failures = 0;

  flag_reg dut (.clk, .rst_n, .flag_ld, .c_we, .z_we, .c_in, .z_in, .c, .z);

  always #5 clk = ~clk;

  initial begin
    #12;
    checks++; if (c !== 1'b0 || z !== 1'b0) begin failures++; $display("FAIL reset"); end
    rst_n = 1;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      {flag_ld, c_we, z_we, c_in, z_in} = 5'($urandom);
      @(posedge clk); #1;
      if (flag_ld && c_we) ec = c_in;
      if (flag_ld && z_we) ez = z_in;
      checks++;
      if (c !== ec || z !== ez) begin
        failures++;
        $display("FAIL c=%0b z=%0b exp %0b %0b", c, z, ec, ez);
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
