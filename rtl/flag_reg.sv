// flag_reg: the carry (C) and zero (Z) flags.
// Each flag takes its new value from the ALU on a rising clock edge when the
// control unit's execute strobe flag_ld is high and the ALU marks that flag
// as written by the current opcode (c_we, z_we). C is fed back into the ALU
// for ROL/ROR and both flags go to the control unit for JNC/JNZ. The two
// flags come from the design; the strobe and the reset to 0 are this
// design's choices.
module flag_reg (
  input  logic clk,
  input  logic rst_n,
  input  logic flag_ld,
  input  logic c_we,
  input  logic z_we,
  input  logic c_in,
  input  logic z_in,
  output logic c,
  output logic z
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c <= 1'b0;
      z <= 1'b0;
    end else if (flag_ld) begin
      if (c_we) c <= c_in;
      if (z_we) z <= z_in;
    end
  end
endmodule
