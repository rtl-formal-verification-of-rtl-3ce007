// proc_top: the processor system - core, program memory and data memory.
// The core fetches from prog_rom (addressed by the PC, enabled by prog_en)
// and loads/stores through data_ram (addressed by the ALU output, written
// when d_data_out is high). The two memories are separate (Harvard
// organisation) and 2^AW words deep, matching the 16-bit address buses.
// A host fills the program memory through load_en/load_addr/load_data while
// rst_n holds the core in reset, then releases rst_n; the core starts at
// address 0. The data-memory buses and the PC are brought out so that
// memory-mapped devices or a monitor can follow the program. DW must stay 16
// (instruction format); AW may be reduced to shrink both memories.
module proc_top #(
  parameter int unsigned AW = 16,
  parameter int unsigned DW = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          load_en,
  input  logic [AW-1:0] load_addr,
  input  logic [DW-1:0] load_data,
  output logic [DW-1:0] instr_addr,
  output logic [DW-1:0] addr_bus,
  output logic [DW-1:0] data_bus_out,
  output logic          d_data_out
);
  logic          prog_en;
  logic [DW-1:0] instr_code, data_bus_in;

  proc_core #(.DW(DW)) u_core (
    .clk, .rst_n, .instr_addr, .prog_en, .instr_code,
    .addr_bus, .data_bus_out, .data_bus_in, .d_data_out
  );

  prog_rom #(.AW(AW), .DW(DW)) u_rom (
    .clk, .addr(instr_addr[AW-1:0]), .prog_en, .rom_data(instr_code),
    .load_en, .load_addr, .load_data
  );

  data_ram #(.AW(AW), .DW(DW)) u_ram (
    .clk, .addr(addr_bus[AW-1:0]), .we(d_data_out), .wdata(data_bus_out),
    .rdata(data_bus_in)
  );
endmodule
