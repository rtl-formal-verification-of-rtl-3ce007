// tb_ir_reg: instruction register - load/hold and the field split
// (opcode [15:11], rs [10:9], inst_mode [8], imm [7:0], offset [10:0]).
module tb_ir_reg;
  logic        clk = 0, rst_n = 0, ir_ld = 0;
  logic [15:0] rom_data = 0, ir_out, expv;
  logic [4:0]  opcode;
  logic [1:0]  rs;
  logic        inst_mode;
  logic [7:0]  imm;
  logic [10:0] offset;
  int checks = 0, failures = 0;

  ir_reg #(.DW(16)) dut (.clk, .rst_n, .ir_ld, .rom_data, .ir_out,
                         .opcode, .rs, .inst_mode, .imm, .offset);

  always #5 clk = ~clk;

  task automatic check(string what, logic [15:0] got, logic [15:0] want);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s got=%04h want=%04h", what, got, want);
    end
  endtask

  initial begin
    #12;
    check("reset", ir_out, 16'h0000);
    rst_n = 1;
    expv  = 16'h0000;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      ir_ld    = 1'($urandom);
      rom_data = 16'($urandom);
      @(posedge clk); #1;
      if (ir_ld) expv = rom_data;
      check("ir_out", ir_out, expv);
      check("opcode", 16'(opcode), 16'(expv >> 11));
      check("rs", 16'(rs), 16'((expv >> 9) & 16'h3));
      check("inst_mode", 16'(inst_mode), 16'((expv >> 8) & 16'h1));
      check("imm", 16'(imm), expv & 16'h00ff);
      check("offset", 16'(offset), expv & 16'h07ff);
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
