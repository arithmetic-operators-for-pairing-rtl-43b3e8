// dp_ram -- register file of the pairing coprocessor: a dual-port RAM of
// DEPTH words of WIDTH bits.
//
// Both ports are synchronous: the word at addr_x appears on q_x one clock
// after the address, and a write (we_x high) stores din_x at the clock edge.
// A read of the address being written on the same port returns the old word
// (read-first). Writing the same address from both ports in one cycle is not
// allowed (the assertion flags it). The accelerator maps this onto block RAM
// (6 FPGA memory blocks for 128 words of 198 bits); the read-first mode and
// the collision rule are this design's choice. Contents are not reset.
module dp_ram #(
  parameter int unsigned DEPTH = 128,
  parameter int unsigned WIDTH = 198,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic             clk,
  // port A
  input  logic [AW-1:0]    addr_a,
  input  logic             we_a,
  input  logic [WIDTH-1:0] din_a,
  output logic [WIDTH-1:0] q_a,
  // port B
  input  logic [AW-1:0]    addr_b,
  input  logic             we_b,
  input  logic [WIDTH-1:0] din_b,
  output logic [WIDTH-1:0] q_b
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    q_a <= mem[addr_a];
    if (we_a) mem[addr_a] <= din_a;
  end

  always_ff @(posedge clk) begin
    q_b <= mem[addr_b];
    if (we_b) mem[addr_b] <= din_b;
  end

  always @(posedge clk)
    assert (!(we_a && we_b && addr_a == addr_b))
      else $error("dp_ram: both ports write address %0d", addr_a);
endmodule
