// pc_decoder: next-PC logic.
// Chooses the value the PC loads next from three sources the datapath
// drawing connects to this block: the current PC plus one (sequential flow
// and the return address stored by SPC), the current PC plus the
// sign-extended 11-bit offset from IR (JMP, and JNZ/JNC when taken) and a
// word from the data bus (LPC, which reloads the PC from mem[SP]).
//   pc_sel1 = 1            -> data_bus
//   pc_sel1 = 0, pc_sel=1  -> pc + sext(offset)
//   pc_sel1 = 0, pc_sel=0  -> pc + 1
// The inputs and the names pc_sel/pc_sel1 come from the drawing; what each
// select value does is this design's choice. Jumps are relative: the PC has
// already been advanced past the jump when its target is formed, so the
// target is (jump address + 1 + offset). Combinational.
module pc_decoder #(
  parameter int unsigned DW = 16,
  parameter int unsigned OW = 11
) (
  input  logic [DW-1:0] pc,
  input  logic [OW-1:0] offset,
  input  logic [DW-1:0] data_bus,
  input  logic          pc_sel,
  input  logic          pc_sel1,
  output logic [DW-1:0] next_pc
);
  logic [DW-1:0] off_ext;

  always_comb begin
    off_ext = {{(DW-OW){offset[OW-1]}}, offset};
    if (pc_sel1)     next_pc = data_bus;
    else if (pc_sel) next_pc = pc + off_ext;
    else             next_pc = pc + DW'(1);
  end
endmodule
