// proc_core: 16-bit non-pipelined load/store processor.
// Arithmetic and logic work only on the four registers A, B, T and SP;
// only LDB/LDS/STB/STS/LPC/SPC touch data memory, which is separate from
// program memory. There are carry and zero flags and no interrupts.
// Datapath, as drawn for the design:
//   PC -> Instruction Address; Instruction Code -> IR.
//   IR.offset, PC and the data bus -> PC decoder -> PC (and, for SPC, the
//   data-bus write multiplexer).
//   Register file port a -> ALU input a; port b (T) or the sign-extended
//   immediate -> ALU input b; ALU result -> Address Bus and the register
//   write multiplexer, whose other input is the data bus.
//   C and Z flags beside the ALU; C feeds back into it.
// Timing: 3 clocks per instruction (ST_FETCH0, ST_FETCH1, ST_EXEC, see
// control_unit). Program memory is read combinationally in ST_FETCH0 with
// prog_en low; data memory is read combinationally and written at the end
// of ST_EXEC with d_data_out high.
// pstate and ir_out are not used inside the core; they are named signals
// so that a checker can compare them with an instruction-set model.
module proc_core
  import proc_pkg::*;
#(
  parameter int unsigned DW = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  // program memory
  output logic [DW-1:0] instr_addr,
  output logic          prog_en,
  input  logic [DW-1:0] instr_code,
  // data memory
  output logic [DW-1:0] addr_bus,
  output logic [DW-1:0] data_bus_out,
  input  logic [DW-1:0] data_bus_in,
  output logic          d_data_out
);
  // control
  state_e     pstate;
  logic       ir_ld, pc_load, pc_sel, pc_sel1, reg_load;
  logic       mem_sel, mem_sel1, op_sel, flag_ld;
  logic [1:0] reg_sel, ld_sel;
  // IR fields
  logic [DW-1:0]   ir_out;
  logic [OPW-1:0]  opcode;
  logic [1:0]      rs;
  logic            inst_mode;
  logic [IMMW-1:0] imm;
  logic [OFFW-1:0] offset;
  // datapath
  logic [DW-1:0] pc_out, next_pc_1, a_out, b_out, imm_ext, alu_b, alu_y, wdata;
  logic          c, z, c_new, z_new, c_we, z_we;

  control_unit u_ctrl (
    .clk, .rst_n, .opcode, .rs, .inst_mode, .c, .z,
    .pstate, .prog_en, .ir_ld, .pc_load, .pc_sel, .pc_sel1,
    .reg_sel, .ld_sel, .reg_load, .mem_sel, .mem_sel1, .op_sel,
    .d_data_out, .flag_ld
  );

  ir_reg #(.DW(DW)) u_ir (
    .clk, .rst_n, .ir_ld, .rom_data(instr_code), .ir_out,
    .opcode, .rs, .inst_mode, .imm, .offset
  );

  pc_decoder #(.DW(DW), .OW(OFFW)) u_pcdec (
    .pc(pc_out), .offset, .data_bus(data_bus_in), .pc_sel, .pc_sel1,
    .next_pc(next_pc_1)
  );

  pc_reg #(.DW(DW)) u_pc (
    .clk, .rst_n, .pc_ld(pc_load), .next_pc_1, .pc_out
  );

  reg_file #(.DW(DW)) u_regfile (
    .clk, .rst_n, .reg_sel, .ld_sel, .reg_load, .wdata, .a_out, .b_out
  );

  sign_ext #(.IW(IMMW), .DW(DW)) u_sext (.imm, .ext(imm_ext));

  mux2 #(.DW(DW)) u_op_mux  (.d0(b_out), .d1(imm_ext), .sel(op_sel), .y(alu_b));
  mux2 #(.DW(DW)) u_mem_mux (.d0(alu_y), .d1(data_bus_in), .sel(mem_sel), .y(wdata));
  mux2 #(.DW(DW)) u_out_mux (.d0(b_out), .d1(next_pc_1), .sel(mem_sel1), .y(data_bus_out));

  alu #(.DW(DW)) u_alu (
    .a(a_out), .b(alu_b), .opcode, .c_in(c),
    .y(alu_y), .c_out(c_new), .z_out(z_new), .c_we, .z_we
  );

  flag_reg u_flags (
    .clk, .rst_n, .flag_ld, .c_we, .z_we, .c_in(c_new), .z_in(z_new), .c, .z
  );

  always_comb begin
    instr_addr = pc_out;
    addr_bus   = alu_y;
  end
endmodule
