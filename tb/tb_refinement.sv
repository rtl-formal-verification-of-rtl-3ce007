// tb_refinement: refinement check of the processor system against the
// cycle-level specification isa_spec, with the five relations written as
// concurrent assertions:
//   lemma1  IR of the implementation equals the specification's, every cycle
//   lemma2  opcode equals the specification's, every cycle
//   lemma3  A, B, T, SP equal the specification's in ST_FETCH0
//   lemma4  C and Z equal the specification's in ST_FETCH0
//   lemma5  PC equals the specification's in ST_FETCH0
// plus a check that both sides are always in the same control state.
// The implementation and the specification run the same random program
// (every instruction, forward jumps, SPC/LPC pairs, zero results followed
// by COM, a closing jump to 0) for
// a fixed number of cycles after the program is loaded. Each lemma must
// have been evaluated in its enabling state and never violated.
module tb_refinement;
  import proc_pkg::*;

  localparam int PLEN   = 256;
  localparam int NCYCLE = 24000;

  logic        clk = 0, rst_n = 0, load_en = 0;
  logic [15:0] load_addr = 0, load_data = 0;
  logic [15:0] instr_addr, addr_bus, data_bus_out;
  logic        d_data_out;
  logic [15:0] rom [PLEN];
  logic [15:0] spec_rom_addr, spec_rom_data;
  state_e      pstate_ab;
  logic [15:0] ir_ab, ra_ab, rb_ab, rt_ab, rsp_ab, pc_ab;
  logic [4:0]  opcode_ab;
  logic        c_ab, z_ab;
  int checks = 0, failures = 0;
  int n_pass [6];

  proc_top dut (.clk, .rst_n, .load_en, .load_addr, .load_data,
                .instr_addr, .addr_bus, .data_bus_out, .d_data_out);

  isa_spec spec (.clk, .rst_n, .rom_addr(spec_rom_addr), .rom_data(spec_rom_data),
                 .pstate_ab, .ir_ab, .opcode_ab, .ra_ab, .rb_ab, .rt_ab, .rsp_ab, .pc_ab,
                 .c_ab, .z_ab);

  always_comb spec_rom_data = (spec_rom_addr < 16'(PLEN)) ? rom[spec_rom_addr[7:0]] : 16'h0;

  always #5 clk = ~clk;

  wire fetch0 = (dut.u_core.u_ctrl.pstate == ST_FETCH0);

  lemma0: assert property (@(posedge clk) disable iff (!rst_n)
      dut.u_core.u_ctrl.pstate == pstate_ab) n_pass[0]++;
    else begin failures++; $display("FAIL state sync at %0t", $time); end
  lemma1: assert property (@(posedge clk) disable iff (!rst_n)
      dut.u_core.u_ir.ir_out == ir_ab) n_pass[1]++;
    else begin failures++; $display("FAIL lemma1 IR at %0t", $time); end
  lemma2: assert property (@(posedge clk) disable iff (!rst_n)
      dut.u_core.u_ir.opcode == opcode_ab) n_pass[2]++;
    else begin failures++; $display("FAIL lemma2 opcode at %0t", $time); end
  lemma3: assert property (@(posedge clk) disable iff (!rst_n)
      fetch0 |-> (dut.u_core.u_regfile.ra == ra_ab && dut.u_core.u_regfile.rb == rb_ab &&
                  dut.u_core.u_regfile.rsp == rsp_ab && dut.u_core.u_regfile.rt == rt_ab))
      begin if (fetch0) n_pass[3]++; end
    else begin failures++; $display("FAIL lemma3 registers at %0t", $time); end
  lemma4: assert property (@(posedge clk) disable iff (!rst_n)
      fetch0 |-> (dut.u_core.u_flags.c == c_ab && dut.u_core.u_flags.z == z_ab))
      begin if (fetch0) n_pass[4]++; end
    else begin failures++; $display("FAIL lemma4 flags at %0t", $time); end
  lemma5: assert property (@(posedge clk) disable iff (!rst_n)
      fetch0 |-> (dut.u_core.u_pc.pc_out == pc_ab))
      begin if (fetch0) n_pass[5]++; end
    else begin failures++; $display("FAIL lemma5 PC at %0t", $time); end

  initial begin
    int i;
    foreach (n_pass[k]) n_pass[k] = 0;
    i = 0;
    while (i < PLEN - 1) begin
      automatic int k = $urandom % 100;
      if (k < 8) begin
        automatic int off = 1 + int'($urandom % 16);
        if (i + 1 + off > PLEN - 1) off = PLEN - 2 - i;
        rom[i++] = enc_j((k < 3) ? OP_JNZ : (k < 6) ? OP_JNC : OP_JMP, 11'(off));
      end else if (k < 14 && i < PLEN - 2) begin
        // a zero result followed by COM: COM must update Z
        rom[i++] = enc_i(OP_AND, 2'($urandom), 8'h00);
        rom[i++] = enc_r(OP_COM, 2'($urandom));
      end else if (k < 17 && i < PLEN - 2) begin
        rom[i++] = enc_r(OP_SPC, 2'(R_A));
        rom[i++] = enc_r(OP_LPC, 2'(R_A));
      end else begin
        automatic logic [4:0] op = 5'($urandom % 22);
        if (op inside {OP_JNZ, OP_JNC, OP_JMP, OP_LPC}) op = OP_SUB;
        rom[i++] = {op, 2'($urandom), 1'($urandom), 8'($urandom)};
      end
    end
    rom[PLEN-1] = enc_j(OP_JMP, 11'(-PLEN));
    // a jump landing on the LPC of a pair is moved onto its SPC
    for (int j = 0; j < PLEN - 1; j++)
      if (rom[j][15:11] inside {OP_JNZ, OP_JNC, OP_JMP} &&
          rom[j + 1 + int'(rom[j][10:0])][15:11] == OP_LPC)
        rom[j][10:0] = rom[j][10:0] - 11'd1;

    @(negedge clk);
    for (int a = 0; a < PLEN; a++) begin
      load_en = 1; load_addr = 16'(a); load_data = rom[a];
      @(negedge clk);
    end
    load_en = 0;
    rst_n = 1;
    repeat (NCYCLE) @(negedge clk);
    for (int k = 0; k < 6; k++) begin
      $display("lemma%0d held %0d times", k, n_pass[k]);
      checks += n_pass[k];
      if (n_pass[k] < NCYCLE / 4) begin
        failures++;
        $display("FAIL lemma%0d was checked too rarely", k);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NCYCLE + PLEN + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
