// pc_reg: program counter.
// A DW-bit register that takes next_pc_1 (from the PC decoder) on a rising
// clock edge while pc_ld is high and otherwise holds. Its output pc_out is
// the instruction address of the program memory and also feeds back into
// the PC decoder. The register and the names pc_ld, next_pc_1 and pc_out
// follow the drawings of the design; the asynchronous active-low reset to
// address 0 is this design's choice.
module pc_reg #(
  parameter int unsigned DW = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          pc_ld,
  input  logic [DW-1:0] next_pc_1,
  output logic [DW-1:0] pc_out
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     pc_out <= '0;
    else if (pc_ld) pc_out <= next_pc_1;
  end
endmodule
