// mux2: two-input word multiplexer of the processor datapath.
// It is used three times: mem_sel picks the register write data (ALU result
// or data-bus word), op_sel picks the ALU's second operand (T or the
// sign-extended immediate) and mem_sel1 picks the word written to data
// memory (T or the PC decoder's output, for SPC). sel = 0 gives d0 and
// sel = 1 gives d1; which input is d1 at each use is this design's choice,
// the drawing shows only the inputs. Combinational.
module mux2 #(
  parameter int unsigned DW = 16
) (
  input  logic [DW-1:0] d0,
  input  logic [DW-1:0] d1,
  input  logic          sel,
  output logic [DW-1:0] y
);
  always_comb y = sel ? d1 : d0;
endmodule
