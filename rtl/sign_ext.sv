// sign_ext: sign extension of the instruction's immediate field.
// The 8-bit immediate from IR is widened to the data-path width by copying
// its top bit, so ADDI/SUBI/ANDI/ORRI/XORI take operands from -128 to +127.
// Purely combinational and gate-free: sign extension is wiring, kept as a
// block of its own because the datapath draws it as one. The block and its 8-to-16 widths appear in the
// processor's datapath drawing; replicating bit IW-1 is the usual meaning.
module sign_ext #(
  parameter int unsigned IW = 8,
  parameter int unsigned DW = 16
) (
  input  logic [IW-1:0] imm,
  output logic [DW-1:0] ext
);
  always_comb ext = {{(DW-IW){imm[IW-1]}}, imm};
endmodule
