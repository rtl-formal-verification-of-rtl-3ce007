// tb_prog_rom: program memory - zero start-up contents, load port writes,
// combinational read while prog_en = 0, output 0 while prog_en = 1.
// Runs at a reduced depth (AW = 10).
module tb_prog_rom;
  localparam int AW = 10;
  logic          clk = 0, prog_en = 1, load_en = 0;
  logic [AW-1:0] addr = 0, load_addr = 0;
  logic [15:0]   rom_data, load_data = 0;
  logic [15:0]   model [2**AW];
  int checks = 0, failures = 0;

  prog_rom #(.AW(AW), .DW(16)) dut (.clk, .addr, .prog_en, .rom_data, .load_en, .load_addr, .load_data);

  always #5 clk = ~clk;

  initial begin
    foreach (model[i]) model[i] = '0;
    @(negedge clk);
    prog_en = 0;
    for (int i = 0; i < 16; i++) begin
      addr = AW'($urandom); #1;
      checks++; if (rom_data !== 16'h0) begin failures++; $display("FAIL init %0d", addr); end
    end
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      load_en = 1'($urandom); load_addr = AW'($urandom % 64); load_data = 16'($urandom);
      @(posedge clk);
      if (load_en) model[load_addr] = load_data;
    end
    @(negedge clk);
    load_en = 0;
    for (int i = 0; i < 64; i++) begin
      @(negedge clk);
      addr = AW'(i); prog_en = 1'($urandom); #1;
      checks++;
      if (rom_data !== (prog_en ? 16'h0 : model[i])) begin
        failures++;
        $display("FAIL read %0d en_n=%0b got %04h want %04h", i, prog_en, rom_data, model[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
