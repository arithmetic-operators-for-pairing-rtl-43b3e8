// instr_rom -- instruction memory of the pairing coprocessor: DEPTH words of
// 32 bits with a synchronous read (the word appears one clock after the
// address, as in an FPGA block RAM).
//
// The contents come from a hex file (one 32-bit word per line, see
// gf3_pkg::instr_t for the fields). Words the file leaves out read as the
// HALT word, so a short program ends cleanly. The 10-bit address (1024
// words) and 32-bit width are those of the accelerator's instruction memory.
module instr_rom #(
  parameter int unsigned DEPTH     = 1024,
  parameter int unsigned AW        = $clog2(DEPTH),
  parameter string       INIT_FILE = "rtl/eta_t_program.hex"
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  output logic [31:0]   q
);
  logic [31:0] mem [DEPTH];

  initial begin
    for (int i = 0; i < int'(DEPTH); i++) mem[i] = gf3_pkg::INSTR_HALT;
    if (INIT_FILE != "") $readmemh(INIT_FILE, mem);
  end

  always_ff @(posedge clk) q <= mem[addr];
endmodule
