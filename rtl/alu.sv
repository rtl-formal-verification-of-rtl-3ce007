// alu: arithmetic and logic unit of the processor.
// Operand a is the register read on port a; operand b is T or the
// sign-extended immediate. The opcode from IR selects the function:
//   ADD  y = a + b          C = carry out       Z
//   SUB  y = a - b          C = borrow          Z
//   AND/ORR/XOR  y = a op b                     Z
//   COM  y = ~a                                 Z
//   ROL  y = {a[14:0], C}   C = a[15]           Z   (rotate through carry)
//   ROR  y = {C, a[15:1]}   C = a[0]            Z
//   LUI  y = {b[7:0], a[7:0]}  (upper byte from the immediate)
//   CLC/STC  C = 0 / 1
//   any other opcode: y = a (register or address pass-through)
// c_we and z_we say which flags the opcode writes; the flag registers take
// them only in the execute step. The instruction list and the zero-flag
// update by COM follow the design's specification; the other flag rules, the
// borrow convention and the byte-merging LUI are this design's choices.
// Purely combinational. The 16-bit rotate and LUI forms assume DW = 16.
module alu
  import proc_pkg::*;
#(
  parameter int unsigned DW = 16
) (
  input  logic [DW-1:0]  a,
  input  logic [DW-1:0]  b,
  input  logic [OPW-1:0] opcode,
  input  logic           c_in,
  output logic [DW-1:0]  y,
  output logic           c_out,
  output logic           z_out,
  output logic           c_we,
  output logic           z_we
);
  logic [DW:0] sum;

  always_comb begin
    y     = a;
    c_out = c_in;
    c_we  = 1'b0;
    z_we  = 1'b0;
    sum   = '0;
    unique case (opcode)
      OP_ADD: begin
        sum   = {1'b0, a} + {1'b0, b};
        y     = sum[DW-1:0];
        c_out = sum[DW];
        c_we  = 1'b1;
        z_we  = 1'b1;
      end
      OP_SUB: begin
        sum   = {1'b0, a} - {1'b0, b};
        y     = sum[DW-1:0];
        c_out = sum[DW];
        c_we  = 1'b1;
        z_we  = 1'b1;
      end
      OP_AND: begin y = a & b; z_we = 1'b1; end
      OP_ORR: begin y = a | b; z_we = 1'b1; end
      OP_XOR: begin y = a ^ b; z_we = 1'b1; end
      OP_COM: begin y = ~a;    z_we = 1'b1; end
      OP_ROL: begin
        y     = {a[DW-2:0], c_in};
        c_out = a[DW-1];
        c_we  = 1'b1;
        z_we  = 1'b1;
      end
      OP_ROR: begin
        y     = {c_in, a[DW-1:1]};
        c_out = a[0];
        c_we  = 1'b1;
        z_we  = 1'b1;
      end
      OP_LUI: y = {b[7:0], a[7:0]};
      OP_CLC: begin c_out = 1'b0; c_we = 1'b1; end
      OP_STC: begin c_out = 1'b1; c_we = 1'b1; end
      default: y = a;
    endcase
    z_out = (y == '0);
  end
endmodule
