// data_ram: data memory (RAM) of the processor, 2^AW words of DW bits.
// Only the load and store instructions reach it. The address comes from the
// ALU output (register B or SP passed through), writes happen on a rising
// clock edge while we (the processor's d_data_out) is high, and the word at
// addr is always readable combinationally on rdata, so a load completes in
// the execute cycle. The 16-bit address and data buses follow the design;
// the read/write timing and zero start-up contents are this design's.
module data_ram #(
  parameter int unsigned AW = 16,
  parameter int unsigned DW = 16
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  input  logic          we,
  input  logic [DW-1:0] wdata,
  output logic [DW-1:0] rdata
);
  logic [DW-1:0] mem [2**AW];

  initial begin
    for (int i = 0; i < 2**AW; i++) mem[i] = '0;
  end

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
  end

  always_comb rdata = mem[addr];
endmodule
