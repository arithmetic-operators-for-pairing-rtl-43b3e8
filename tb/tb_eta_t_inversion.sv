// tb_eta_t_inversion -- runs the inversion program (Itoh-Tsujii style
// exponentiation a^(3^97 - 2) = a^(-1): 96 cubings and 9 multiplications
// over F_{3^97}) on the full coprocessor and checks a * a^(-1) = 1 for
// random nonzero a, the number of cubings and multiplications the operator
// performed, and the run time against the program.
module tb_eta_t_inversion;
  import gf3_pkg::*;
  import tb_gf3_ref_pkg::*;

  localparam int IN = 0, OUT = 16, CW0 = 64, RUNS = 4;

  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst, start, busy, done, sel, host_we;
  logic [6:0] host_addr;
  logic [197:0] host_din;
  logic [193:0] q_a;

  eta_t_coprocessor #(.PROGRAM("rtl/inversion_program.hex")) dut (
    .clk, .rst, .start, .busy, .done, .sel, .host_addr, .host_we, .host_din, .q_a);

  int n_cube, n_mul;
  pe_ctrl_t pc;
  assign pc = dut.pe_ctrl;
  always @(posedge clk) begin
    if (pc.p_en && !pc.mul_mode) n_cube++;
    if (pc.p_en && pc.mul_mode && pc.pp1_mulx && !pc.acc_en) n_mul++;
  end

  logic [197:0] consts [128];
  logic [31:0]  prog   [1024];

  task automatic host_write(int addr, logic [197:0] v);
    sel = 1; host_addr = 7'(addr); host_din = v; host_we = 1;
    @(posedge clk); #1;
    host_we = 0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    elem_t a, inv;
    int prog_cycles, cycles;
    for (int i = 0; i < 128; i++) consts[i] = '0;
    for (int i = 0; i < 1024; i++) prog[i] = INSTR_HALT;
    $readmemh("rtl/inversion_constants.hex", consts);
    $readmemh("rtl/inversion_program.hex", prog);
    prog_cycles = 3;   // start cycle, HALT fetch, drain
    for (int i = 0; i < 1024 && prog[i] != INSTR_HALT; i++) prog_cycles += int'(prog[i][31:26]) + 1;

    rst = 1; start = 0; sel = 1; host_we = 0; host_addr = '0; host_din = '0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int i = CW0; i < 128; i++) host_write(i, consts[i]);

    for (int run = 0; run < RUNS; run++) begin
      a = rand_elem();
      if (run == 0) a = ref_one();
      if (a == '0) a[0] = 2'd2;
      host_write(IN, {4'b0, a});
      n_cube = 0; n_mul = 0;
      sel = 0; start = 1;
      @(posedge clk); #1;
      start = 0;
      cycles = 1;
      while (!done) begin @(posedge clk); #1; cycles++; end
      sel = 1; host_addr = 7'(OUT);
      @(posedge clk); #1;
      inv = q_a;
      checks++;
      if (ref_mul(a, inv) !== ref_one()) begin
        failures++;
        $display("FAIL a * a^-1 != 1 for a=%h, got %h", a, inv);
      end
      checks++;
      if (n_cube != 96 || n_mul != 9) begin
        failures++;
        $display("FAIL %0d cubings and %0d multiplications, expected 96 and 9", n_cube, n_mul);
      end
      checks++;
      if (cycles != prog_cycles) begin
        failures++;
        $display("FAIL run took %0d cycles, program needs %0d", cycles, prog_cycles);
      end
    end
    $display("inversion: %0d cycles", prog_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
