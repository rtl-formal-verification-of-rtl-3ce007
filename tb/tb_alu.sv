// tb_alu: every opcode with random and corner operands against a reference
// written from the instruction-set table (result, new carry, new zero, and
// which flags are written). COM must write the zero flag.
module tb_alu;
  import proc_pkg::*;
  logic [15:0] a, b, y;
  logic [4:0]  opcode;
  logic        c_in, c_out, z_out, c_we, z_we;
  int checks = 0, failures = 0;

  alu #(.DW(16)) dut (.a, .b, .opcode, .c_in, .y, .c_out, .z_out, .c_we, .z_we);

  task automatic expect_out(logic [15:0] ey, logic ecw, logic ec, logic ezw);
    checks++;
    if (y !== ey || c_we !== ecw || (ecw && c_out !== ec) || z_we !== ezw ||
        (ezw && z_out !== (ey == 16'h0))) begin
      failures++;
      $display("FAIL op=%0d a=%04h b=%04h c=%0b: y=%04h c=%0b/%0b z=%0b/%0b exp y=%04h c=%0b/%0b zw=%0b",
               opcode, a, b, c_in, y, c_out, c_we, z_out, z_we, ey, ec, ecw, ezw);
    end
  endtask

  task automatic run_one();
    int unsigned s;
    #1;
    case (opcode)
      OP_ADD: begin s = int'(a) + int'(b); expect_out(16'(s), 1, s > 32'hffff, 1); end
      OP_SUB: expect_out(a - b, 1, a < b, 1);
      OP_AND: expect_out(a & b, 0, 0, 1);
      OP_ORR: expect_out(a | b, 0, 0, 1);
      OP_XOR: expect_out(a ^ b, 0, 0, 1);
      OP_COM: expect_out(16'hffff - a, 0, 0, 1);
      OP_ROL: expect_out(16'((a * 2) & 16'hfffe) | 16'(c_in), 1, a[15], 1);
      OP_ROR: expect_out((a / 2) | (c_in ? 16'h8000 : 16'h0), 1, a[0], 1);
      OP_LUI: expect_out((b * 256) | (a & 16'h00ff), 0, 0, 0);
      OP_CLC: expect_out(a, 1, 0, 0);
      OP_STC: expect_out(a, 1, 1, 0);
      default: expect_out(a, 0, 0, 0);
    endcase
  endtask

  initial begin
    for (int op = 0; op < 32; op++) begin
      opcode = 5'(op);
      // corners: zero results and carries
      a = 16'hffff; b = 16'h0001; c_in = 0; run_one();
      a = 16'h0000; b = 16'h0000; c_in = 1; run_one();
      a = 16'hffff; b = 16'hffff; c_in = 0; run_one();
      a = 16'h8001; b = 16'h8001; c_in = 1; run_one();
      for (int i = 0; i < 60; i++) begin
        a = 16'($urandom); b = 16'($urandom); c_in = 1'($urandom);
        run_one();
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
