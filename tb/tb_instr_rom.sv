// tb_instr_rom -- checks the instruction ROM: the words of a four-word hex
// file are read back one clock after the address, and every other address
// reads as the HALT word.
module tb_instr_rom;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [9:0] addr;
  logic [31:0] q;
  logic [31:0] exp [4] = '{32'h01234567, 32'h89abcdef, 32'hdeadbeef, 32'h00000042};

  instr_rom #(.INIT_FILE("tb/tb_instr_rom_test.hex")) dut (.clk, .addr, .q);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      addr = 10'(i);
      @(posedge clk); #1;
      checks++;
      if (q !== ((i < 4) ? exp[i] : 32'hFFFF_FFFF)) begin
        failures++;
        $display("FAIL addr %0d q=%h", i, q);
      end
    end
    addr = 10'd1023;
    @(posedge clk); #1;
    checks++;
    if (q !== 32'hFFFF_FFFF) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
