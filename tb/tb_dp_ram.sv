// tb_dp_ram -- checks the dual-port RAM: writes through both ports, reads
// back through the other port with one clock of latency, read-first
// behaviour on a same-port write, and simultaneous reads of two addresses.
module tb_dp_ram;
  localparam int DEPTH = 128, WIDTH = 198, AW = 7;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [AW-1:0] addr_a, addr_b;
  logic we_a, we_b;
  logic [WIDTH-1:0] din_a, din_b, q_a, q_b;
  logic [WIDTH-1:0] model [DEPTH];

  dp_ram dut (.clk, .addr_a, .we_a, .din_a, .q_a, .addr_b, .we_b, .din_b, .q_b);

  function automatic logic [WIDTH-1:0] rnd();
    logic [WIDTH-1:0] v;
    for (int i = 0; i < WIDTH; i += 32) v[i +: 32] = $urandom;
    return v;
  endfunction

  task automatic check(string what, logic [WIDTH-1:0] got, logic [WIDTH-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%h exp=%h", what, got, exp);
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we_a = 0; we_b = 0; addr_a = 0; addr_b = 0; din_a = 0; din_b = 0;
    // fill: even addresses through A, odd through B, in the same cycles
    for (int i = 0; i < DEPTH; i += 2) begin
      addr_a = AW'(i); din_a = rnd(); we_a = 1;
      addr_b = AW'(i + 1); din_b = rnd(); we_b = 1;
      model[i] = din_a; model[i+1] = din_b;
      @(posedge clk); #1;
    end
    we_a = 0; we_b = 0;
    // read back crossed: A reads odd, B reads even
    for (int n = 0; n < 200; n++) begin
      int ia = $urandom_range(0, DEPTH - 1), ib = $urandom_range(0, DEPTH - 1);
      addr_a = AW'(ia); addr_b = AW'(ib);
      @(posedge clk); #1;
      check("read A", q_a, model[ia]);
      check("read B", q_b, model[ib]);
    end
    // read-first on a write
    addr_b = 7'd5; din_b = rnd(); we_b = 1;
    @(posedge clk); #1;
    we_b = 0;
    check("read-first", q_b, model[5]);
    model[5] = din_b;
    @(posedge clk); #1;
    check("new value", q_b, model[5]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
