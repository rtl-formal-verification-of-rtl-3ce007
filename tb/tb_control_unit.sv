// tb_control_unit: the three-state sequence and, for every opcode and flag
// value, the control word issued in the execute state, compared with a
// table derived from the instruction definitions. Also checks that each
// instruction takes exactly 3 cycles (one ST_FETCH0 every third cycle).
module tb_control_unit;
  import proc_pkg::*;
  logic       clk = 0, rst_n = 0;
  logic [4:0] opcode = 0;
  logic [1:0] rs = 0;
  logic       inst_mode = 0, c = 0, z = 0;
  state_e     pstate;
  logic       prog_en, ir_ld, pc_load, pc_sel, pc_sel1, reg_load, mem_sel, mem_sel1, op_sel, d_data_out, flag_ld;
  logic [1:0] reg_sel, ld_sel;
  int checks = 0, failures = 0;

  control_unit dut (.clk, .rst_n, .opcode, .rs, .inst_mode, .c, .z, .pstate, .prog_en, .ir_ld,
                    .pc_load, .pc_sel, .pc_sel1, .reg_sel, .ld_sel, .reg_load, .mem_sel,
                    .mem_sel1, .op_sel, .d_data_out, .flag_ld);

  always #5 clk = ~clk;

  task automatic chk(string what, logic got, logic want);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL op=%0d c=%0b z=%0b %s got=%0b want=%0b", opcode, c, z, what, got, want);
    end
  endtask

  initial begin
    int first_fetch0, n_fetch0;
    @(negedge clk);
    rst_n = 1;
    for (int op = 0; op < 32; op++) begin
      for (int f = 0; f < 4; f++) begin
        logic alu_wr, ld, st, jmp_taken;
        // FETCH0
        checks++; if (pstate !== ST_FETCH0) begin failures++; $display("FAIL not in FETCH0"); end
        chk("prog_en@F0", prog_en, 0);
        chk("ir_ld@F0", ir_ld, 1);
        chk("pc_load@F0", pc_load, 0);
        chk("reg_load@F0", reg_load, 0);
        chk("d_data_out@F0", d_data_out, 0);
        opcode = 5'(op); {c, z} = 2'(f); rs = 2'($urandom); inst_mode = 1'($urandom);
        @(negedge clk);
        checks++; if (pstate !== ST_FETCH1) begin failures++; $display("FAIL not in FETCH1"); end
        chk("prog_en@F1", prog_en, 1);
        chk("ir_ld@F1", ir_ld, 0);
        chk("pc_load@F1", pc_load, 1);
        chk("pc_sel@F1", pc_sel | pc_sel1, 0);
        chk("reg_load@F1", reg_load, 0);
        @(negedge clk);
        checks++; if (pstate !== ST_EXEC) begin failures++; $display("FAIL not in EXEC"); end
        chk("prog_en@EX", prog_en, 1);
        chk("ir_ld@EX", ir_ld, 0);
        chk("flag_ld@EX", flag_ld, 1);
        alu_wr = op inside {[1:9]};
        ld     = op inside {15, 16};
        st     = op inside {17, 18, 20};
        jmp_taken = (op == 14) || (op == 12 && !z) || (op == 13 && !c) || (op == 19);
        chk("reg_load", reg_load, alu_wr || ld || op == 21);
        chk("d_data_out", d_data_out, st);
        chk("pc_load", pc_load, jmp_taken);
        if (op inside {12, 13, 14}) chk("pc_sel", pc_sel, 1);
        chk("pc_sel1", pc_sel1, op == 19);
        chk("mem_sel", mem_sel, ld);
        if (st) chk("mem_sel1", mem_sel1, op == 20);
        if (op inside {[1:5]}) chk("op_sel", op_sel, inst_mode);
        if (op == 9) chk("op_sel LUI", op_sel, 1);
        if (alu_wr) begin
          chk("reg_sel", reg_sel == rs, 1);
          chk("ld_sel", ld_sel == rs, 1);
        end
        if (op inside {15, 17}) chk("reg_sel=B", reg_sel == 2'(R_B), 1);
        if (op inside {16, 18, 19, 20}) chk("reg_sel=SP", reg_sel == 2'(R_SP), 1);
        if (ld) chk("ld_sel=rs", ld_sel == rs, 1);
        if (op == 21) begin
          chk("R2T reg_sel", reg_sel == rs, 1);
          chk("R2T ld_sel", ld_sel == 2'(R_T), 1);
        end
        @(negedge clk);
      end
    end
    // 3-cycle rhythm
    n_fetch0 = 0; first_fetch0 = -1;
    for (int cyc = 0; cyc < 30; cyc++) begin
      @(negedge clk);
      if (pstate == ST_FETCH0) begin
        if (first_fetch0 < 0) first_fetch0 = cyc;
        else begin
          checks++;
          if ((cyc - first_fetch0) % 3 != 0) begin failures++; $display("FAIL rhythm"); end
        end
        n_fetch0++;
      end
    end
    checks++; if (n_fetch0 != 10) begin failures++; $display("FAIL %0d fetches in 30 cycles", n_fetch0); end
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
