// tb_proc_core: the processor core with testbench-side memories, running a
// directed program that uses every instruction: constant building with
// ANDI/ORRI/LUI, R2T, stores and loads through B and SP, ADD/SUB, XOR, COM,
// ROL/ROR through carry, CLC/STC, taken and not-taken JNZ/JNC, and a
// subroutine call with SPC + JMP and return with LPC.
// The core runs in lockstep with the instruction-set model (isa_model_pkg):
// IR and opcode are compared in the two states after each fetch, and the
// registers, flags and PC at every ST_FETCH0. At the end the registers and
// two memory words are compared with hand-computed values, and the fetch
// rhythm must be exactly one instruction per 3 clock cycles.
module tb_proc_core;
  import proc_pkg::*;
  import isa_model_pkg::*;

  logic        clk = 0, rst_n = 0;
  logic [15:0] instr_addr, instr_code, addr_bus, data_bus_out, data_bus_in;
  logic        prog_en, d_data_out;
  logic [15:0] rom [256];
  logic [15:0] ram [int];
  int checks = 0, failures = 0;
  isa_model m;

  proc_core #(.DW(16)) dut (.clk, .rst_n, .instr_addr, .prog_en, .instr_code,
                            .addr_bus, .data_bus_out, .data_bus_in, .d_data_out);

  always #5 clk = ~clk;

  // testbench memories
  always_comb instr_code  = prog_en ? 16'h0 : rom[instr_addr[7:0]];
  always_comb data_bus_in = ram.exists(int'(addr_bus)) ? ram[int'(addr_bus)] : 16'h0;
  always @(posedge clk) if (d_data_out) ram[int'(addr_bus)] = data_bus_out;

  task automatic chk(string what, logic [15:0] got, logic [15:0] want);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s got=%04h want=%04h (model pc=%04h)", what, got, want, m.pc);
    end
  endtask

  initial begin
    int p, cyc, last_f0, n_instr;
    m = new();
    foreach (rom[i]) rom[i] = 16'h0;
    p = 0;
    rom[p++] = enc_i(OP_AND, R_A, 8'h00);
    rom[p++] = enc_i(OP_ORR, R_A, 8'h34);
    rom[p++] = enc_i(OP_LUI, R_A, 8'h12);
    rom[p++] = enc_i(OP_AND, R_B, 8'h00);
    rom[p++] = enc_i(OP_ORR, R_B, 8'h10);
    rom[p++] = enc_r(OP_R2T, R_A);
    rom[p++] = enc_r(OP_STB, R_A);
    rom[p++] = enc_i(OP_ADD, R_B, 8'h01);
    rom[p++] = enc_r(OP_LDB, R_A);
    rom[p++] = enc_r(OP_ADD, R_A);
    rom[p++] = enc_r(OP_SUB, R_A);
    rom[p++] = enc_i(OP_AND, R_SP, 8'h00);
    rom[p++] = enc_i(OP_ORR, R_SP, 8'h40);
    rom[p++] = enc_r(OP_STS, R_A);
    rom[p++] = enc_r(OP_LDS, R_B);
    rom[p++] = enc_r(OP_XOR, R_B);
    rom[p++] = enc_j(OP_JNZ, 11'd1);      // 16: not taken (Z=1)
    rom[p++] = enc_r(OP_COM, R_B);        // 17: B=ffff, Z=0
    rom[p++] = enc_j(OP_JNZ, 11'd1);      // 18: taken -> 20
    rom[p++] = enc_i(OP_AND, R_A, 8'h00); // 19: skipped
    rom[p++] = enc_r(OP_STC, R_A);        // 20
    rom[p++] = enc_j(OP_JNC, 11'd1);      // 21: not taken
    rom[p++] = enc_r(OP_ROR, R_A);        // 22: A=807f C=1
    rom[p++] = enc_r(OP_CLC, R_A);        // 23
    rom[p++] = enc_r(OP_ROL, R_A);        // 24: A=00fe C=1
    rom[p++] = enc_j(OP_JNC, 11'd1);      // 25: not taken
    rom[p++] = enc_r(OP_CLC, R_A);        // 26
    rom[p++] = enc_j(OP_JNC, 11'd1);      // 27: taken -> 29
    rom[p++] = enc_i(OP_AND, R_A, 8'h00); // 28: skipped
    rom[p++] = enc_r(OP_SPC, R_A);        // 29: mem[40] = 31
    rom[p++] = enc_j(OP_JMP, 11'd2);      // 30: call 33
    rom[p++] = enc_i(OP_XOR, R_A, 8'h0f); // 31: A=00f1
    rom[p++] = enc_j(OP_JMP, 11'h7ff);    // 32: stay here
    rom[p++] = enc_i(OP_ADD, R_B, 8'h02); // 33: B=0001 C=1
    rom[p++] = enc_r(OP_LPC, R_A);        // 34: return to 31
    foreach (rom[i]) m.rom[i] = rom[i];
    ram[32'h11] = 16'h00ff;
    m.ram[32'h11] = 16'h00ff;

    @(negedge clk);
    rst_n = 1;
    cyc = 0; last_f0 = -3; n_instr = 0;
    while (!(m.pc == 16'd32 && n_instr > 40)) begin
      if (dut.u_ctrl.pstate == ST_FETCH0) begin
        chk("fetch period", 16'(cyc - last_f0), 16'd3);
        last_f0 = cyc;
        chk("A",  dut.u_regfile.ra,  m.r[0]);
        chk("B",  dut.u_regfile.rb,  m.r[1]);
        chk("T",  dut.u_regfile.rt,  m.r[2]);
        chk("SP", dut.u_regfile.rsp, m.r[3]);
        chk("C",  16'(dut.u_flags.c), 16'(m.c));
        chk("Z",  16'(dut.u_flags.z), 16'(m.z));
        chk("PC", dut.u_pc.pc_out, m.pc);
        m.step();
        n_instr++;
      end else begin
        chk("IR", dut.u_ir.ir_out, m.ir);
        chk("opcode", 16'(dut.u_ir.opcode), 16'(m.ir[15:11]));
      end
      @(negedge clk); cyc++;
    end
    // hand-computed end state
    chk("end A",  dut.u_regfile.ra,  16'h00f1);
    chk("end B",  dut.u_regfile.rb,  16'h0001);
    chk("end T",  dut.u_regfile.rt,  16'h1234);
    chk("end SP", dut.u_regfile.rsp, 16'h0040);
    chk("end C",  16'(dut.u_flags.c), 16'd1);
    chk("end Z",  16'(dut.u_flags.z), 16'd0);
    chk("mem[10]", ram[32'h10], 16'h1234);
    chk("mem[40]", ram[32'h40], 16'd31);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
