// tb_pc_decoder: next-PC selection - PC+1, PC + sign-extended 11-bit
// offset (with wrap-around) and the data-bus word.
module tb_pc_decoder;
  logic [15:0] pc, data_bus, next_pc;
  logic [10:0] offset;
  logic        pc_sel, pc_sel1;
  int checks = 0, failures = 0;

  pc_decoder #(.DW(16), .OW(11)) dut (.pc, .offset, .data_bus, .pc_sel, .pc_sel1, .next_pc);

  function automatic logic [15:0] ref_next();
    int signed off;
    off = (offset >= 11'd1024) ? int'(offset) - 2048 : int'(offset);
    if (pc_sel1)     return data_bus;
    else if (pc_sel) return 16'((int'(pc) + off) & 16'hffff);
    else             return 16'((int'(pc) + 1) & 16'hffff);
  endfunction

  initial begin
    // corner cases
    pc = 16'hffff; offset = 0; data_bus = 0; pc_sel = 0; pc_sel1 = 0; #1;
    checks++; if (next_pc !== 16'h0000) begin failures++; $display("FAIL wrap +1"); end
    pc = 16'h0010; offset = 11'h7ff; pc_sel = 1; #1;
    checks++; if (next_pc !== 16'h000f) begin failures++; $display("FAIL offset -1"); end
    pc = 16'h0010; offset = 11'h400; #1;
    checks++; if (next_pc !== 16'hfc10) begin failures++; $display("FAIL offset -1024"); end
    for (int i = 0; i < 500; i++) begin
      pc = 16'($urandom); offset = 11'($urandom); data_bus = 16'($urandom);
      pc_sel = 1'($urandom); pc_sel1 = 1'($urandom);
      #1;
      checks++;
      if (next_pc !== ref_next()) begin
        failures++;
        $display("FAIL pc=%04h off=%03h sel=%0b%0b got=%04h", pc, offset, pc_sel1, pc_sel, next_pc);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
