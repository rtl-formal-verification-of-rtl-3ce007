// tb_proc_top: end-to-end test of the processor system at its default size
// (2^16-word program and data memories). A host-side loader writes each
// program into the program memory through the load port while the core is
// held in reset, then lets it run.
// Program 1 is a directed program (a subroutine called in a loop, with
// hand-computed results). Programs 2..5 are random 512-word programs that
// widen step by step, as a stepwise check would: computation instructions
// only, then with jumps (targets stay inside the program), then with loads
// and stores, then everything including SPC/LPC call-return pairs. Each ends
// with a jump back to 0.
// Every program runs in lockstep with the instruction-set model
// (isa_model_pkg), in the manner of the design's refinement lemmas:
//   IR and opcode equal the model's after every fetch (lemma 1, 2),
//   A, B, T, SP, C, Z and PC equal the model's at every ST_FETCH0
//   (lemma 3, 4, 5), and every store on the data bus matches the model's.
// Each mechanism of the design is counted and must occur at least once:
// every opcode, immediate and register operand modes, taken and not-taken
// conditional jumps, carry out of ADD, borrow of SUB, a carry rotated in,
// COM giving zero, loads, stores, call (SPC) and return (LPC).
module tb_proc_top;
  import proc_pkg::*;
  import isa_model_pkg::*;

  localparam int PLEN   = 512;
  localparam int NSTEPS = 6000;

  logic        clk = 0, rst_n = 0, load_en = 0;
  logic [15:0] load_addr = 0, load_data = 0;
  logic [15:0] instr_addr, addr_bus, data_bus_out;
  logic        d_data_out;
  int checks = 0, failures = 0;
  int n_op [32];
  int n_imm, n_jtaken, n_jnot, n_addc, n_subb, n_rotc, n_comz, n_store, n_call, n_ret;
  isa_model m;
  logic [15:0] prog [PLEN];

  proc_top dut (.clk, .rst_n, .load_en, .load_addr, .load_data,
                .instr_addr, .addr_bus, .data_bus_out, .d_data_out);

  always #5 clk = ~clk;

  task automatic chk(string what, logic [15:0] got, logic [15:0] want);
    checks++;
    if (got !== want) begin
      failures++;
      if (failures < 20)
        $display("FAIL %s got=%04h want=%04h (model pc=%04h ir=%04h)", what, got, want, m.pc, m.ir);
    end
  endtask

  // Hold the core in reset, write prog[0..n-1] at address 0, release reset.
  task automatic load_and_start(int n);
    @(negedge clk);
    rst_n = 0;
    for (int i = 0; i < n; i++) begin
      load_en = 1; load_addr = 16'(i); load_data = prog[i];
      m.rom[i] = prog[i];
      @(negedge clk);
    end
    load_en = 0;
    m.reset();
    rst_n = 1;
  endtask

  // Record which mechanisms the next instruction (at model pc) exercises.
  function automatic void count(logic [15:0] w);
    logic [4:0]  op = w[15:11];
    logic [15:0] v = m.r[w[10:9]];
    logic [15:0] o = w[8] ? {{8{w[7]}}, w[7:0]} : m.r[2];
    n_op[op]++;
    if (w[8] && op inside {[1:5]}) n_imm++;
    if (op == OP_JNZ) begin if (!m.z) n_jtaken++; else n_jnot++; end
    if (op == OP_JNC) begin if (!m.c) n_jtaken++; else n_jnot++; end
    if (op == OP_ADD && (17'(v) + 17'(o)) > 17'hffff) n_addc++;
    if (op == OP_SUB && v < o) n_subb++;
    if (op inside {OP_ROL, OP_ROR} && m.c) n_rotc++;
    if (op == OP_COM && v == 16'hffff) n_comz++;
    if (op inside {OP_STB, OP_STS, OP_SPC}) n_store++;
    if (op == OP_SPC) n_call++;
    if (op == OP_LPC) n_ret++;
  endfunction

  // Run until the model has executed nsteps instructions, or stop_pc is
  // reached after at least nsteps instructions when stop_pc >= 0.
  task automatic run_lockstep(int nsteps, int stop_pc);
    int n = 0, cyc = 0, last_f0 = -3;
    logic [15:0] exp_addr, exp_data;
    logic        exp_store;
    exp_store = 0; exp_addr = 0; exp_data = 0;
    forever begin
      if (dut.u_core.u_ctrl.pstate == ST_FETCH0) begin
        if (n > 0) chk("fetch period", 16'(cyc - last_f0), 16'd3);
        last_f0 = cyc;
        chk("A",  dut.u_core.u_regfile.ra,  m.r[0]);
        chk("B",  dut.u_core.u_regfile.rb,  m.r[1]);
        chk("T",  dut.u_core.u_regfile.rt,  m.r[2]);
        chk("SP", dut.u_core.u_regfile.rsp, m.r[3]);
        chk("C",  16'(dut.u_core.u_flags.c), 16'(m.c));
        chk("Z",  16'(dut.u_core.u_flags.z), 16'(m.z));
        chk("PC", dut.u_core.u_pc.pc_out, m.pc);
        if ((stop_pc < 0 && n >= nsteps) || (stop_pc >= 0 && n >= nsteps && m.pc == 16'(stop_pc)))
          break;
        count(m.rd_rom(m.pc));
        exp_store = m.rd_rom(m.pc)[15:11] inside {OP_STB, OP_STS, OP_SPC};
        exp_addr  = (m.rd_rom(m.pc)[15:11] == OP_STB) ? m.r[1] : m.r[3];
        exp_data  = (m.rd_rom(m.pc)[15:11] == OP_SPC) ? m.pc + 16'd2 : m.r[2];
        m.step();
        n++;
      end else begin
        chk("IR", dut.u_core.u_ir.ir_out, m.ir);
        chk("opcode", 16'(dut.u_core.u_ir.opcode), 16'(m.ir[15:11]));
        if (dut.u_core.u_ctrl.pstate == ST_EXEC) begin
          chk("store strobe", 16'(d_data_out), 16'(exp_store));
          if (exp_store) begin
            chk("store addr", addr_bus, exp_addr);
            chk("store data", data_bus_out, exp_data);
          end
        end
      end
      @(negedge clk); cyc++;
    end
  endtask

  // stage 1: computation instructions only; stage 2: plus jumps;
  // stage 3: plus loads and stores; stage 4 and up: everything, with calls.
  function automatic void make_random_prog(int stage);
    int i = 0;
    while (i < PLEN - 1) begin
      int k = $urandom % 100;
      logic [4:0] op;
      if (k < 8 && stage >= 2) begin
        // conditional or plain forward jump that stays inside the program,
        // so every program keeps running round its closing jump to 0
        int off = 1 + int'($urandom % 32);
        if (i + 1 + off > PLEN - 1) off = PLEN - 2 - i;
        op = (k < 3) ? OP_JNZ : (k < 6) ? OP_JNC : OP_JMP;
        prog[i++] = enc_j(op, 11'(off));
      end else if (k < 10 && i < PLEN - 2) begin
        // a zero result followed by COM, which must then clear Z
        prog[i++] = enc_i(OP_AND, 2'($urandom), 8'h00);
        prog[i++] = enc_r(OP_COM, 2'($urandom));
      end else if (k < 13 && i < PLEN - 2 && stage >= 4) begin
        prog[i++] = enc_r(OP_SPC, 2'($urandom));
        prog[i++] = enc_r(OP_LPC, 2'($urandom));
      end else begin
        op = 5'($urandom % 22);
        if (op inside {OP_JNZ, OP_JNC, OP_JMP, OP_LPC}) op = OP_ADD;
        if (stage < 3 && op inside {OP_LDB, OP_LDS, OP_STB, OP_STS, OP_SPC}) op = OP_XOR;
        prog[i++] = {op, 2'($urandom), 1'($urandom), 8'($urandom)};
      end
    end
    prog[PLEN-1] = enc_j(OP_JMP, 11'(-PLEN));   // back to address 0
    // A jump must not land between SPC and LPC of a pair: move it onto the SPC.
    for (int j = 0; j < PLEN - 1; j++) begin
      if (prog[j][15:11] inside {OP_JNZ, OP_JNC, OP_JMP}) begin
        int t = j + 1 + int'($signed(prog[j][10:0]));
        if (prog[t][15:11] == OP_LPC) prog[j][10:0] = prog[j][10:0] - 11'd1;
      end
    end
  endfunction

  initial begin
    int p;
    m = new();
    foreach (n_op[i]) n_op[i] = 0;
    {n_imm, n_jtaken, n_jnot, n_addc, n_subb, n_rotc, n_comz, n_store, n_call, n_ret} = '0;

    // ---- program 1: directed, with hand-computed results ----
    foreach (prog[i]) prog[i] = 16'h0;
    p = 0;
    prog[p++] = enc_i(OP_AND, R_SP, 8'h00);   // 0  SP = 0
    prog[p++] = enc_i(OP_ORR, R_SP, 8'h7f);   // 1  SP = 007f
    prog[p++] = enc_i(OP_LUI, R_SP, 8'h80);   // 2  SP = 807f
    prog[p++] = enc_i(OP_AND, R_A, 8'h00);    // 3  A = 0
    prog[p++] = enc_i(OP_ORR, R_A, 8'h05);    // 4  A = 5 (loop counter)
    prog[p++] = enc_i(OP_AND, R_T, 8'h00);    // 5  T = 0 (sum)
    prog[p++] = enc_r(OP_SPC, R_A);           // 6  mem[SP] = 8
    prog[p++] = enc_j(OP_JMP, 11'd5);         // 7  call 13
    prog[p++] = enc_i(OP_SUB, R_A, 8'h01);    // 8  A--
    prog[p++] = enc_j(OP_JNZ, 11'h7fc);       // 9  loop to 6 while A != 0
    prog[p++] = enc_i(OP_AND, R_B, 8'h00);    // 10 B = 0
    prog[p++] = enc_r(OP_STB, R_A);           // 11 mem[0] = T
    prog[p++] = enc_j(OP_JMP, 11'h7ff);       // 12 halt
    prog[p++] = enc_r(OP_R2T, R_T);           // 13 (subroutine) T = T
    prog[p++] = enc_i(OP_ADD, R_T, 8'h03);    // 14 T += 3
    prog[p++] = enc_r(OP_COM, R_T);           // 15 T = ~T
    prog[p++] = enc_r(OP_COM, R_T);           // 16 T = ~T
    prog[p++] = enc_i(OP_AND, R_B, 8'h00);    //    B = 0
    prog[p++] = enc_r(OP_COM, R_B);           //    B = ffff
    prog[p++] = enc_r(OP_COM, R_B);           //    B = 0, Z = 1
    prog[p++] = enc_r(OP_LPC, R_A);           //    return
    load_and_start(p);
    run_lockstep(20, 12);
    chk("directed: sum", dut.u_core.u_regfile.rt, 16'd15);
    chk("directed: SP", dut.u_core.u_regfile.rsp, 16'h807f);
    chk("directed: mem[0]", dut.u_ram.mem[0], 16'd15);
    chk("directed: return address", dut.u_ram.mem[16'h807f], 16'd8);

    // ---- programs 2..5: random ----
    for (int r = 1; r <= 4; r++) begin
      make_random_prog(r);
      load_and_start(PLEN);
      run_lockstep(NSTEPS, -1);
    end

    // ---- mechanism coverage ----
    for (int op = 0; op < 22; op++) begin
      checks++;
      if (n_op[op] == 0) begin failures++; $display("FAIL opcode %0d never executed", op); end
    end
    begin
      int cnt [10];
      string nm [10];
      cnt = '{n_imm, n_jtaken, n_jnot, n_addc, n_subb, n_rotc, n_comz, n_store, n_call, n_ret};
      nm  = '{"immediate operand", "jump taken", "jump not taken", "ADD carry", "SUB borrow",
              "carry rotated in", "COM to zero", "store", "call (SPC)", "return (LPC)"};
      for (int i = 0; i < 10; i++) begin
        $display("mechanism %-18s %0d", nm[i], cnt[i]);
        checks++;
        if (cnt[i] == 0) begin failures++; $display("FAIL mechanism %s never happened", nm[i]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
