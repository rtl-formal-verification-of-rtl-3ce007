// isa_spec: cycle-level instruction-set specification of the processor,
// for refinement checking. It steps through the same three states as the
// control unit (ST_FETCH0, ST_FETCH1, ST_EXEC) so that specification and
// implementation start and finish every instruction together, but inside it
// is behavioural: in ST_FETCH0 it takes ir_ab = ROM[pc_ab], and in ST_EXEC it
// performs the whole instruction at once on its own copies of the registers
// (ra_ab, rb_ab, rt_ab, rsp_ab), flags (c_ab, z_ab), PC (pc_ab) and data
// memory. It reads the program through its own ROM port (rom_addr/rom_data).
// Nothing of the datapath (multiplexers, control signals, PC decoder) is
// modelled. Used with the lemmas in tb_refinement.
module isa_spec
  import proc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  output logic [15:0] rom_addr,
  input  logic [15:0] rom_data,
  output state_e      pstate_ab,
  output logic [15:0] ir_ab,
  output logic [4:0]  opcode_ab,
  output logic [15:0] ra_ab, rb_ab, rt_ab, rsp_ab, pc_ab,
  output logic        c_ab, z_ab
);
  logic [15:0] ram_ab [int];

  function automatic logic [15:0] ram_rd(logic [15:0] a);
    return ram_ab.exists(int'(a)) ? ram_ab[int'(a)] : 16'h0;
  endfunction

  always_comb begin
    rom_addr  = pc_ab;
    opcode_ab = ir_ab[15:11];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pstate_ab <= ST_FETCH0;
      ir_ab <= '0; pc_ab <= '0;
      ra_ab <= '0; rb_ab <= '0; rt_ab <= '0; rsp_ab <= '0;
      c_ab <= 1'b0; z_ab <= 1'b0;
    end else begin
      unique case (pstate_ab)
        ST_FETCH0: begin
          ir_ab     <= rom_data;
          pstate_ab <= ST_FETCH1;
        end
        ST_FETCH1: pstate_ab <= ST_EXEC;
        default: begin
          logic [15:0] r [4];
          logic [15:0] opnd, v, nxt;
          logic [16:0] wide;
          logic        c, z;
          logic [1:0]  rr;
          r    = '{ra_ab, rb_ab, rt_ab, rsp_ab};
          c    = c_ab; z = z_ab;
          rr   = ir_ab[10:9];
          v    = r[rr];
          opnd = ir_ab[8] ? {{8{ir_ab[7]}}, ir_ab[7:0]} : rt_ab;
          nxt  = pc_ab + 16'd1;
          case (ir_ab[15:11])
            OP_ADD: begin wide = {1'b0, v} + {1'b0, opnd}; r[rr] = wide[15:0]; c = wide[16]; z = (r[rr] == 0); end
            OP_SUB: begin c = (v < opnd); r[rr] = v - opnd; z = (r[rr] == 0); end
            OP_AND: begin r[rr] = v & opnd; z = (r[rr] == 0); end
            OP_ORR: begin r[rr] = v | opnd; z = (r[rr] == 0); end
            OP_XOR: begin r[rr] = v ^ opnd; z = (r[rr] == 0); end
            OP_COM: begin r[rr] = ~v; z = (r[rr] == 0); end
            OP_ROL: begin r[rr] = {v[14:0], c}; c = v[15]; z = (r[rr] == 0); end
            OP_ROR: begin r[rr] = {c, v[15:1]}; c = v[0]; z = (r[rr] == 0); end
            OP_LUI: r[rr] = {ir_ab[7:0], v[7:0]};
            OP_CLC: c = 1'b0;
            OP_STC: c = 1'b1;
            OP_JNZ: if (!z) nxt = nxt + {{5{ir_ab[10]}}, ir_ab[10:0]};
            OP_JNC: if (!c) nxt = nxt + {{5{ir_ab[10]}}, ir_ab[10:0]};
            OP_JMP: nxt = nxt + {{5{ir_ab[10]}}, ir_ab[10:0]};
            OP_LDB: r[rr] = ram_rd(rb_ab);
            OP_LDS: r[rr] = ram_rd(rsp_ab);
            OP_STB: ram_ab[int'(rb_ab)] = rt_ab;
            OP_STS: ram_ab[int'(rsp_ab)] = rt_ab;
            OP_LPC: nxt = ram_rd(rsp_ab);
            OP_SPC: ram_ab[int'(rsp_ab)] = pc_ab + 16'd2;
            OP_R2T: r[2] = v;
            default: ;
          endcase
          {ra_ab, rb_ab, rt_ab, rsp_ab} <= {r[0], r[1], r[2], r[3]};
          c_ab      <= c;
          z_ab      <= z;
          pc_ab     <= nxt;
          pstate_ab <= ST_FETCH0;
        end
      endcase
    end
  end
endmodule
