// isa_model_pkg: instruction-set reference model of the 16-bit processor,
// for testbenches. It executes one whole instruction per call of step(),
// straight from the instruction-set definition and without any of the
// datapath's structure: IR, PC, the registers A/B/T/SP, the C and Z flags,
// a program memory and a sparse data memory. Testbenches run it in lockstep
// with the RTL and compare IR and the opcode after every fetch and the
// registers, flags and PC at the start of every instruction.
package isa_model_pkg;
  import proc_pkg::*;

  class isa_model;
    logic [15:0] rom [int];
    logic [15:0] ram [int];
    logic [15:0] r [4];
    logic [15:0] pc, ir;
    logic        c, z;

    function new();
      reset();
    endfunction

    function void reset();
      foreach (r[i]) r[i] = '0;
      pc = '0; ir = '0; c = 1'b0; z = 1'b0;
    endfunction

    function logic [15:0] rd_rom(logic [15:0] a);
      return rom.exists(int'(a)) ? rom[int'(a)] : 16'h0000;
    endfunction

    function logic [15:0] rd_ram(logic [15:0] a);
      return ram.exists(int'(a)) ? ram[int'(a)] : 16'h0000;
    endfunction

    // Execute the instruction at pc.
    function void step();
      logic [4:0]  op;
      logic [1:0]  rr;
      logic [15:0] opnd, v, next;
      logic [16:0] wide;
      ir   = rd_rom(pc);
      op   = ir[15:11];
      rr   = ir[10:9];
      opnd = ir[8] ? {{8{ir[7]}}, ir[7:0]} : r[2];
      next = pc + 16'd1;
      v    = r[rr];
      case (op)
        OP_ADD: begin wide = {1'b0, v} + {1'b0, opnd}; r[rr] = wide[15:0]; c = wide[16]; z = (wide[15:0] == 0); end
        OP_SUB: begin c = (v < opnd); r[rr] = v - opnd; z = (r[rr] == 0); end
        OP_AND: begin r[rr] = v & opnd; z = (r[rr] == 0); end
        OP_ORR: begin r[rr] = v | opnd; z = (r[rr] == 0); end
        OP_XOR: begin r[rr] = v ^ opnd; z = (r[rr] == 0); end
        OP_COM: begin r[rr] = ~v; z = (r[rr] == 0); end
        OP_ROL: begin r[rr] = {v[14:0], c}; c = v[15]; z = (r[rr] == 0); end
        OP_ROR: begin r[rr] = {c, v[15:1]}; c = v[0]; z = (r[rr] == 0); end
        OP_LUI: r[rr] = {ir[7:0], v[7:0]};
        OP_CLC: c = 1'b0;
        OP_STC: c = 1'b1;
        OP_JNZ: if (!z) next = next + {{5{ir[10]}}, ir[10:0]};
        OP_JNC: if (!c) next = next + {{5{ir[10]}}, ir[10:0]};
        OP_JMP: next = next + {{5{ir[10]}}, ir[10:0]};
        OP_LDB: r[rr] = rd_ram(r[1]);
        OP_LDS: r[rr] = rd_ram(r[3]);
        OP_STB: ram[int'(r[1])] = r[2];
        OP_STS: ram[int'(r[3])] = r[2];
        OP_LPC: next = rd_ram(r[3]);
        OP_SPC: ram[int'(r[3])] = pc + 16'd2;
        OP_R2T: r[2] = v;
        default: ;
      endcase
      pc = next;
    endfunction
  endclass
endpackage
