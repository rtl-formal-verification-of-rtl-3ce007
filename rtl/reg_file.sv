// reg_file: the four general registers A, B, T and SP.
// Port a (a_out) reads the register chosen by reg_sel and feeds the ALU's
// first input. Port b (b_out) always reads T: every two-operand instruction
// uses T as its second operand and the stores write T to memory. The one
// write port takes wdata on a rising edge while reg_load is high into the
// register chosen by ld_sel. Read and write selects are separate because
// LDB/LDS read B or SP for the address while writing r, and R2T reads r
// while writing T. The register set and the control names reg_sel, ld_sel, reg_load
// follow the design; the meaning given to the controls is this design's.
// Reads are combinational; reset clears all registers.
module reg_file
  import proc_pkg::*;
#(
  parameter int unsigned DW = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [1:0]    reg_sel,
  input  logic [1:0]    ld_sel,
  input  logic          reg_load,
  input  logic [DW-1:0] wdata,
  output logic [DW-1:0] a_out,
  output logic [DW-1:0] b_out
);
  logic [DW-1:0] ra, rb, rt, rsp;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ra  <= '0;
      rb  <= '0;
      rt  <= '0;
      rsp <= '0;
    end else if (reg_load) begin
      unique case (ld_sel)
        2'(R_A):  ra  <= wdata;
        2'(R_B):  rb  <= wdata;
        2'(R_T):  rt  <= wdata;
        default:  rsp <= wdata;
      endcase
    end
  end

  always_comb begin
    unique case (reg_sel)
      2'(R_A):  a_out = ra;
      2'(R_B):  a_out = rb;
      2'(R_T):  a_out = rt;
      default:  a_out = rsp;
    endcase
    b_out = rt;
  end
endmodule
