// prog_rom: program memory (ROM) of the processor, 2^AW words of DW bits.
// The PC addresses it; while the active-low enable prog_en is 0 the
// addressed word appears combinationally on rom_data, and IR captures it at
// the end of the fetch state. While prog_en is 1 the output is 0.
// The memory is kept apart from the data memory, as the design requires.
// How the program gets into the ROM is left open by the design; here a load
// port (load_en, load_addr, load_data, written on a rising clock edge) lets a
// host fill it while the processor is held in reset. Contents start at 0,
// which decodes as NOP.
module prog_rom #(
  parameter int unsigned AW = 16,
  parameter int unsigned DW = 16
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  input  logic          prog_en,
  output logic [DW-1:0] rom_data,
  input  logic          load_en,
  input  logic [AW-1:0] load_addr,
  input  logic [DW-1:0] load_data
);
  logic [DW-1:0] mem [2**AW];

  initial begin
    for (int i = 0; i < 2**AW; i++) mem[i] = '0;
  end

  always_ff @(posedge clk) begin
    if (load_en) mem[load_addr] <= load_data;
  end

  always_comb rom_data = prog_en ? '0 : mem[addr];
endmodule
