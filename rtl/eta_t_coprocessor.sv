// eta_t_coprocessor -- compact coprocessor for the eta_T pairing over
// F_{3^97} = F_3[x]/(x^97 + x^12 + 2): one unified operator (addition,
// multiplication, cubing), a dual-port RAM register file and a control unit
// made of an instruction ROM and a sequencing FSM.
//
// Data flow: RAM port A feeds operand d2(x) (low 194 bits) and is also the
// host's port: while 'sel' is high the host's address and write enable drive
// port A, so it can load P, Q, constants and control words (198-bit words)
// before a run and read results (q_a) after it. Port B feeds d1(x) (low 194
// bits) and d0(x) (all 198 bits, i.e. 99 coefficients for the R0 shift
// register) and is the only port written by the program, with the operator's
// result p(x) zero-extended to 198 bits.
//
// Use: hold sel = 1 and write the RAM; set sel = 0, pulse start; wait for
// done; set sel = 1 and read. The host must not drive sel = 1 while busy.
// Everything runs on one clock with a synchronous active-high reset (RAM
// contents are not reset). Widths (198/194-bit buses, 7-bit RAM addresses,
// 10-bit ROM addresses, 32-bit instructions, 11 control bits) are those of
// the accelerator's block diagram; the program in the ROM is this design's
// own (see the README for what it computes). Port A's top four bits (the
// last R0 coefficients of a control word) are not brought out: results are
// 194-bit elements, as on the diagram's 194-bit output.
module eta_t_coprocessor
  import gf3_pkg::*;
#(
  parameter int unsigned M         = 97,
  parameter int unsigned K         = 12,
  parameter int unsigned TPS       = 1,    // terms per Frobenius slot
  parameter int unsigned RAM_DEPTH = 128,
  parameter int unsigned ROM_DEPTH = 1024,
  parameter string       PROGRAM   = "rtl/eta_t_program.hex",
  parameter int unsigned W0        = 3 * ((M + 2) / 3),   // R0 coefficients
  parameter int unsigned AW        = $clog2(RAM_DEPTH),
  parameter int unsigned PAW       = $clog2(ROM_DEPTH)
) (
  input  logic              clk,
  input  logic              rst,
  // control
  input  logic              start,
  output logic              busy,
  output logic              done,
  // host access to RAM port A
  input  logic              sel,
  input  logic [AW-1:0]     host_addr,
  input  logic              host_we,
  input  logic [2*W0-1:0]   host_din,   // P, Q and constants
  output logic [2*M-1:0]    q_a         // port A read data
);
  logic [PAW-1:0]  rom_addr;
  logic [31:0]     rom_q;
  logic [AW-1:0]   fsm_addr_a, addr_a, addr_b;
  logic            we_a, we_b;
  pe_ctrl_t        pe_ctrl;
  logic [2*W0-1:0] ram_q_a, ram_q_b, din_b;
  logic [M-1:0][1:0]  p;

  instr_rom #(.DEPTH(ROM_DEPTH), .INIT_FILE(PROGRAM)) u_rom (
    .clk, .addr(rom_addr), .q(rom_q)
  );

  ctrl_fsm #(.PAW(PAW), .AW(AW)) u_fsm (
    .clk, .rst, .start, .busy, .done,
    .rom_addr, .rom_q,
    .addr_a(fsm_addr_a), .addr_b, .we_b, .pe_ctrl
  );

  assign addr_a = sel ? host_addr : fsm_addr_a;
  assign we_a   = sel & host_we;
  assign din_b  = {{(2*W0 - 2*M){1'b0}}, p};

  dp_ram #(.DEPTH(RAM_DEPTH), .WIDTH(2*W0)) u_ram (
    .clk,
    .addr_a, .we_a, .din_a(host_din), .q_a(ram_q_a),
    .addr_b, .we_b, .din_b,           .q_b(ram_q_b)
  );

  unified_operator #(.M(M), .K(K), .TPS(TPS), .W0(W0)) u_pe (
    .clk, .rst, .ctrl(pe_ctrl),
    .d0(ram_q_b),
    .d1(ram_q_b[2*M-1:0]),
    .d2(ram_q_a[2*M-1:0]),
    .p
  );

  assign q_a = ram_q_a[2*M-1:0];

  always @(posedge clk)
    assert (rst || !(sel && busy)) else $error("host selected port A during a run");
endmodule
