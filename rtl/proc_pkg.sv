// proc_pkg: shared constants and types of the 16-bit embedded processor.
// It holds the word width, the instruction-field layout, the opcode map,
// the register numbering and the control-unit state type. The instruction
// encoding below is this design's own: the instruction set names 27
// mnemonics but gives no bit patterns. The widths of the offset (11 bits)
// and immediate (8 bits) fields are the ones the datapath drawing prints.
//
// Instruction word layout (16 bits):
//   [15:11] opcode      [10:9] rs (A=0, B=1, T=2, SP=3)
//   [8]     inst_mode   (1 = second operand is the immediate)
//   [7:0]   imm         [10:0] offset (jumps only, signed, PC-relative)
package proc_pkg;

  localparam int unsigned WORD  = 16;
  localparam int unsigned OPW   = 5;
  localparam int unsigned OFFW  = 11;
  localparam int unsigned IMMW  = 8;

  typedef enum logic [OPW-1:0] {
    OP_NOP = 5'd0,
    OP_ADD = 5'd1,   // ADD r / ADDI r,i (inst_mode)
    OP_SUB = 5'd2,   // SUB r / SUBI r,i
    OP_AND = 5'd3,   // AND r / ANDI r,i
    OP_ORR = 5'd4,   // ORR r / ORRI r,i
    OP_XOR = 5'd5,   // XOR r / XORI r,i
    OP_COM = 5'd6,
    OP_ROL = 5'd7,
    OP_ROR = 5'd8,
    OP_LUI = 5'd9,
    OP_CLC = 5'd10,
    OP_STC = 5'd11,
    OP_JNZ = 5'd12,
    OP_JNC = 5'd13,
    OP_JMP = 5'd14,
    OP_LDB = 5'd15,
    OP_LDS = 5'd16,
    OP_STB = 5'd17,
    OP_STS = 5'd18,
    OP_LPC = 5'd19,
    OP_SPC = 5'd20,
    OP_R2T = 5'd21
  } opcode_e;

  typedef enum logic [1:0] {
    R_A  = 2'd0,
    R_B  = 2'd1,
    R_T  = 2'd2,
    R_SP = 2'd3
  } reg_e;

  typedef enum logic [1:0] {
    ST_FETCH0 = 2'd0,   // IR <= ROM[PC]
    ST_FETCH1 = 2'd1,   // PC <= PC + 1
    ST_EXEC   = 2'd2    // execute and write back
  } state_e;

  // Instruction word assembly helpers (used by testbenches and programs).
  function automatic logic [WORD-1:0] enc_r(logic [OPW-1:0] op, logic [1:0] r);
    return {op, r, 1'b0, 8'h00};
  endfunction

  function automatic logic [WORD-1:0] enc_i(logic [OPW-1:0] op, logic [1:0] r,
                                            logic [IMMW-1:0] imm);
    return {op, r, 1'b1, imm};
  endfunction

  function automatic logic [WORD-1:0] enc_j(logic [OPW-1:0] op, logic [OFFW-1:0] off);
    return {op, off};
  endfunction

endpackage
