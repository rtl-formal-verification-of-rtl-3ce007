// ir_reg: instruction register and field split.
// On a rising edge with ir_ld high the register takes rom_data, the word the
// program memory returns for the current PC; otherwise it holds. The stored
// word ir_out is cut into the fields the rest of the processor uses:
// opcode, rs (source and destination register), inst_mode (immediate
// operand), imm (8 bits, to the sign extension) and offset (11 bits, to the
// PC decoder). Field names and the offset/immediate widths follow the
// design's drawings; the bit positions are this design's encoding (see
// proc_pkg). Reset clears the register, which reads as NOP.
module ir_reg
  import proc_pkg::*;
#(
  parameter int unsigned DW = 16
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            ir_ld,
  input  logic [DW-1:0]   rom_data,
  output logic [DW-1:0]   ir_out,
  output logic [OPW-1:0]  opcode,
  output logic [1:0]      rs,
  output logic            inst_mode,
  output logic [IMMW-1:0] imm,
  output logic [OFFW-1:0] offset
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     ir_out <= '0;
    else if (ir_ld) ir_out <= rom_data;
  end

  always_comb begin
    opcode    = ir_out[15:11];
    rs        = ir_out[10:9];
    inst_mode = ir_out[8];
    imm       = ir_out[7:0];
    offset    = ir_out[10:0];
  end
endmodule
