// control_unit: the processor's multi-cycle control state machine.
// The processor is not pipelined; every instruction passes three states:
//   ST_FETCH0  prog_en = 0 (program memory enabled), ir_ld = 1: IR takes the
//              instruction at PC. All results of the previous instruction are
//              in place here, the point where architectural state is compared
//              with the instruction-set model.
//   ST_FETCH1  pc_load = 1 with PC+1 selected: PC moves past the instruction.
//   ST_EXEC    the opcode drives the datapath controls; results are written
//              at the end of this cycle; back to ST_FETCH0.
// So each instruction takes exactly 3 clock cycles. prog_en is 1 (program
// memory disabled) outside ST_FETCH0. Control names follow the datapath
// drawing: reg_sel (register on ALU port a and, through the ALU, on the
// address bus), ld_sel (register written), reg_load, mem_sel (1: write
// register from the data bus), op_sel (1: immediate operand), mem_sel1 (1:
// store the PC decoder output instead of T), d_data_out (data-memory write),
// pc_sel / pc_sel1 (next-PC choice), plus flag_ld (flags may change).
// The prog_en/ir_ld behaviour of the fetch state and the state name
// ST_FETCH0 follow the design; the other states and all per-instruction
// control settings are this design's.
// The assertions at the end sample rst_n synchronously (disable iff), so a
// linter may report rst_n as used both asynchronously and synchronously;
// that use is in checking code only.
module control_unit
  import proc_pkg::*;
(
  input  logic           clk,
  input  logic           rst_n,
  input  logic [OPW-1:0] opcode,
  input  logic [1:0]     rs,
  input  logic           inst_mode,
  input  logic           c,
  input  logic           z,
  output state_e         pstate,
  output logic           prog_en,
  output logic           ir_ld,
  output logic           pc_load,
  output logic           pc_sel,
  output logic           pc_sel1,
  output logic [1:0]     reg_sel,
  output logic [1:0]     ld_sel,
  output logic           reg_load,
  output logic           mem_sel,
  output logic           mem_sel1,
  output logic           op_sel,
  output logic           d_data_out,
  output logic           flag_ld
);
  state_e nstate;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) pstate <= ST_FETCH0;
    else        pstate <= nstate;
  end

  always_comb begin
    nstate     = ST_FETCH0;
    prog_en    = 1'b1;
    ir_ld      = 1'b0;
    pc_load    = 1'b0;
    pc_sel     = 1'b0;
    pc_sel1    = 1'b0;
    reg_sel    = rs;
    ld_sel     = rs;
    reg_load   = 1'b0;
    mem_sel    = 1'b0;
    mem_sel1   = 1'b0;
    op_sel     = inst_mode;
    d_data_out = 1'b0;
    flag_ld    = 1'b0;
    unique case (pstate)
      ST_FETCH0: begin
        prog_en = 1'b0;
        ir_ld   = 1'b1;
        nstate  = ST_FETCH1;
      end
      ST_FETCH1: begin
        pc_load = 1'b1;
        nstate  = ST_EXEC;
      end
      ST_EXEC: begin
        nstate  = ST_FETCH0;
        flag_ld = 1'b1;
        unique case (opcode)
          OP_ADD, OP_SUB, OP_AND, OP_ORR, OP_XOR,
          OP_COM, OP_ROL, OP_ROR:
            reg_load = 1'b1;
          OP_LUI: begin
            op_sel   = 1'b1;
            reg_load = 1'b1;
          end
          OP_JNZ: begin
            pc_sel  = 1'b1;
            pc_load = !z;
          end
          OP_JNC: begin
            pc_sel  = 1'b1;
            pc_load = !c;
          end
          OP_JMP: begin
            pc_sel  = 1'b1;
            pc_load = 1'b1;
          end
          OP_LDB, OP_LDS: begin
            reg_sel  = (opcode == OP_LDB) ? 2'(R_B) : 2'(R_SP);
            mem_sel  = 1'b1;
            reg_load = 1'b1;
          end
          OP_STB, OP_STS: begin
            reg_sel    = (opcode == OP_STB) ? 2'(R_B) : 2'(R_SP);
            d_data_out = 1'b1;
          end
          OP_LPC: begin
            reg_sel = 2'(R_SP);
            pc_sel1 = 1'b1;
            pc_load = 1'b1;
          end
          OP_SPC: begin
            reg_sel    = 2'(R_SP);
            mem_sel1   = 1'b1;
            d_data_out = 1'b1;
          end
          OP_R2T: begin
            ld_sel   = 2'(R_T);
            reg_load = 1'b1;
          end
          default: ;   // NOP, CLC, STC (flags only) and unused opcodes
        endcase
      end
      default: nstate = ST_FETCH0;
    endcase
  end

  // The state register only ever holds the three defined states.
  a_state_legal: assert property (@(posedge clk) disable iff (!rst_n)
    pstate inside {ST_FETCH0, ST_FETCH1, ST_EXEC});
  // The program memory is enabled exactly while IR loads.
  a_fetch_en: assert property (@(posedge clk) disable iff (!rst_n)
    (prog_en == 1'b0) == (pstate == ST_FETCH0));
  // Nothing writes memory and registers in the same cycle.
  a_one_write: assert property (@(posedge clk) disable iff (!rst_n)
    !(d_data_out && reg_load));
endmodule
