// tb_data_ram: data memory at its full 2^16-word size - random writes and
// combinational reads against a sparse model, zero start-up contents,
// no write while we = 0.
module tb_data_ram;
  logic        clk = 0, we = 0;
  logic [15:0] addr = 0, wdata = 0, rdata;
  logic [15:0] model [int];
  int checks = 0, failures = 0;

  data_ram #(.AW(16), .DW(16)) dut (.clk, .addr, .we, .wdata, .rdata);

  always #5 clk = ~clk;

  function automatic logic [15:0] want(logic [15:0] a);
    return model.exists(int'(a)) ? model[int'(a)] : 16'h0;
  endfunction

  initial begin
    for (int i = 0; i < 1500; i++) begin
      @(negedge clk);
      we = 1'($urandom); wdata = 16'($urandom);
      addr = (i % 3 == 0) ? 16'($urandom) : 16'($urandom % 32);
      #1;
      checks++;
      if (rdata !== want(addr)) begin
        failures++;
        $display("FAIL rd %04h got %04h want %04h", addr, rdata, want(addr));
      end
      @(posedge clk);
      if (we) model[int'(addr)] = wdata;
      #1;
      checks++;
      if (rdata !== want(addr)) begin
        failures++;
        $display("FAIL after wr %04h got %04h want %04h", addr, rdata, want(addr));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
