// tb_eta_t_coprocessor -- end-to-end test of the coprocessor at its default
// size (m = 97, 128-word RAM, 1024-word ROM with the shipped program).
//
// For random inputs x_p, y_p, x_q, y_q it loads the RAM through the host
// port (inputs, the constant 1 and the control words), starts the program
// and waits for done, then reads back through port A and compares with
// reference arithmetic for the eta_T algorithm before final exponentiation
// (b = 1): 48 rounds of x_p <- x_p^9 - 1, y_p <- -y_p^9; y_p <- -y_p; d = 1;
// r0 = x_p + x_q + d; R0 = (R0 R1)^3 with the sparse first product; then 48
// rounds of y_p <- -y_p, x_q <- x_q^9, y_q <- y_q^9, d <- d - 1,
// r0 <- x_p + x_q + d, R1 = -r0^2 + y_p y_q s - r0 r - r^2, R0 <- (R0 R1)^3.
// The F_{3^6m} product here is plain schoolbook (basis 1, s, r, sr, r^2,
// sr^2 with s^2 = -1, r^3 = r + 1), unlike the program's Karatsuba scheme.
// It also checks, per run, the number of multiplications (8 + 15*48 = 728)
// and cubings (2*97 - 2 = 192 for tripling plus 5*97 + 1 = 486 for the
// pairing) that the operator performed.
// The run time is checked against the program: sum of (count+1) over all
// executed instructions, one cycle per LOOP pass, plus start and drain
// cycles. It also counts how often each
// mechanism of the operator and control unit was used, and fails if one
// never happened.
module tb_eta_t_coprocessor;
  import gf3_pkg::*;
  import tb_gf3_ref_pkg::*;

  localparam int XP = 0, YP = 1, XQ = 2, YQ = 3, ONE = 4, DD = 5, R0A = 8;
  localparam int OUT0 = 16, CW0 = 64;
  localparam int RUNS = 2;
  typedef elem_t f6_t [6];

  // schoolbook product in F_{3^6m}
  function automatic f6_t mul6(f6_t x, f6_t y);
    elem_t z [5][2];
    f6_t r;
    for (int k = 0; k < 5; k++) begin z[k][0] = '0; z[k][1] = '0; end
    for (int i = 0; i < 3; i++)
      for (int j = 0; j < 3; j++) begin
        z[i+j][0] = ref_add(z[i+j][0], ref_add(ref_mul(x[2*i], y[2*j]),
                                               ref_neg(ref_mul(x[2*i+1], y[2*j+1]))));
        z[i+j][1] = ref_add(z[i+j][1], ref_add(ref_mul(x[2*i], y[2*j+1]),
                                               ref_mul(x[2*i+1], y[2*j])));
      end
    for (int t = 0; t < 2; t++) begin
      z[2][t] = ref_add(z[2][t], z[4][t]); z[1][t] = ref_add(z[1][t], z[4][t]);  // r^4 = r^2 + r
      z[1][t] = ref_add(z[1][t], z[3][t]); z[0][t] = ref_add(z[0][t], z[3][t]);  // r^3 = r + 1
    end
    r = '{z[0][0], z[0][1], z[1][0], z[1][1], z[2][0], z[2][1]};
    return r;
  endfunction

  // cube in F_{3^6m}: every coefficient cubed, times s^3 = -s, r^3 = r + 1
  function automatic f6_t cube6(f6_t x);
    f6_t c, r;
    for (int i = 0; i < 6; i++) c[i] = ref_cube(x[i]);
    r[0] = ref_add(ref_add(c[0], c[2]), c[4]);
    r[1] = ref_neg(ref_add(ref_add(c[1], c[3]), c[5]));
    r[2] = ref_add(c[2], ref_neg(c[4]));
    r[3] = ref_add(ref_neg(c[3]), c[5]);
    r[4] = c[4];
    r[5] = ref_neg(c[5]);
    return r;
  endfunction

  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst, start, busy, done, sel, host_we;
  logic [6:0] host_addr;
  logic [197:0] host_din;
  logic [193:0] q_a;

  eta_t_coprocessor dut (.clk, .rst, .start, .busy, .done, .sel, .host_addr,
                         .host_we, .host_din, .q_a);

  // ---- mechanism counters (observed on the operator's control bits) ----
  int n_mul_step, n_mul_first, n_cube, n_cube_fb, n_add, n_acc, n_shift,
      n_r0_load, n_store, n_repeat, n_loop_back;
  pe_ctrl_t pc;
  assign pc = dut.pe_ctrl;
  always @(posedge clk) begin
    if (pc.p_en && pc.mul_mode && pc.pp1_mulx && pc.acc_en && pc.acc_mulx3) n_mul_step++;
    if (pc.p_en && pc.mul_mode && pc.pp1_mulx && !pc.acc_en) n_mul_first++;
    if (pc.p_en && !pc.mul_mode) n_cube++;
    if (pc.r1_load && !pc.r1_sel_in && pc.r2_load && !pc.r2_sel_in) n_cube_fb++;
    if (pc.p_en && pc.mul_mode && !pc.pp1_mulx) n_add++;
    if (pc.p_en && pc.acc_en && !pc.acc_mulx3) n_acc++;
    if (pc.r0_shift) n_shift++;
    if (pc.r0_load) n_r0_load++;
    if (dut.we_b) n_store++;
    if (dut.u_fsm.rep != 0) n_repeat++;
    if (dut.u_fsm.loop_back) n_loop_back++;
  end

  logic [197:0] consts [128];
  logic [31:0]  prog   [1024];

  // Cycles of one run, by walking the program: count+1 per instruction,
  // one per LOOP pass, plus the start cycle, the HALT fetch and the drain.
  function automatic int program_cycles();
    int pc = 0, n = 3, lc = 0;
    while (prog[pc] != INSTR_HALT) begin
      if (prog[pc][10:0] == LOOP_CTRL && !prog[pc][25]) begin
        n++;
        if (lc != int'(prog[pc][31:26])) begin lc++; pc = int'({prog[pc][20:18], prog[pc][17:11]}); end
        else begin lc = 0; pc++; end
      end else begin
        n += int'(prog[pc][31:26]) + 1;
        pc++;
      end
    end
    return n;
  endfunction

  task automatic host_write(int addr, logic [197:0] v);
    sel = 1; host_addr = 7'(addr); host_din = v; host_we = 1;
    @(posedge clk); #1;
    host_we = 0;
  endtask

  task automatic host_read(int addr, output elem_t v);
    sel = 1; host_addr = 7'(addr); host_we = 0;
    @(posedge clk); #1;
    v = q_a;
  endtask

  task automatic check(string what, elem_t got, elem_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s\n  got=%h\n  exp=%h", what, got, exp);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    elem_t xp, yp, xq, yq, r0, one, got, d;
    f6_t rr0, rr1;
    int prog_cycles, cycles, mul0, cube0;

    for (int i = 0; i < 128; i++) consts[i] = '0;
    for (int i = 0; i < 1024; i++) prog[i] = INSTR_HALT;
    $readmemh("rtl/eta_t_constants.hex", consts);
    $readmemh("rtl/eta_t_program.hex", prog);
    prog_cycles = program_cycles();

    rst = 1; start = 0; sel = 1; host_we = 0; host_addr = '0; host_din = '0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    one = ref_one();

    for (int run = 0; run < RUNS; run++) begin
      xp = rand_elem(); yp = rand_elem(); xq = rand_elem(); yq = rand_elem();
      host_write(XP, {4'b0, xp}); host_write(YP, {4'b0, yp});
      host_write(XQ, {4'b0, xq}); host_write(YQ, {4'b0, yq});
      host_write(ONE, consts[ONE]);
      for (int i = CW0; i < 128; i++) host_write(i, consts[i]);

      mul0 = n_mul_first; cube0 = n_cube;
      sel = 0; start = 1;
      @(posedge clk); #1;
      start = 0;
      cycles = 1;
      while (!done) begin @(posedge clk); #1; cycles++; end
      checks++;
      if (cycles != prog_cycles) begin
        failures++;
        $display("FAIL run took %0d cycles, program needs %0d", cycles, prog_cycles);
      end
      checks++;
      if (n_mul_first - mul0 != 8 + 15 * 48 || n_cube - cube0 != 2*97 - 2 + 5*97 + 1) begin
        failures++;
        $display("FAIL %0d multiplications and %0d cubings, expected 728 and 678",
                 n_mul_first - mul0, n_cube - cube0);
      end

      // reference: point tripling
      for (int i = 0; i < 48; i++) begin
        xp = ref_add(ref_cube(ref_cube(xp)), ref_neg(one));
        yp = ref_neg(ref_cube(ref_cube(yp)));
      end
      yp = ref_neg(yp);
      d  = one;
      r0 = ref_add(ref_add(xp, xq), d);
      rr0 = '{ref_neg(ref_mul(yp, r0)), yq, yp, '0, '0, '0};
      rr1 = '{ref_neg(ref_mul(r0, r0)), ref_mul(yp, yq), ref_neg(r0), '0, ref_neg(one), '0};
      rr0 = cube6(mul6(rr0, rr1));
      for (int i = 0; i < 48; i++) begin
        yp = ref_neg(yp);
        xq = ref_cube(ref_cube(xq));
        yq = ref_cube(ref_cube(yq));
        d  = ref_add(d, ref_neg(one));
        r0 = ref_add(ref_add(xp, xq), d);
        rr1 = '{ref_neg(ref_mul(r0, r0)), ref_mul(yp, yq), ref_neg(r0), '0, ref_neg(one), '0};
        rr0 = cube6(mul6(rr0, rr1));
      end

      host_read(XP, got);  check("x_p", got, xp);
      host_read(YP, got);  check("y_p", got, yp);
      host_read(XQ, got);  check("x_q", got, xq);
      host_read(YQ, got);  check("y_q", got, yq);
      host_read(DD, got);  check("d", got, d);
      host_read(R0A, got); check("r0", got, r0);
      for (int i = 0; i < 6; i++) begin
        host_read(OUT0 + i, got); check($sformatf("R0 coefficient %0d", i), got, rr0[i]);
      end
    end

    // every mechanism must have been exercised
    begin
      int cnt [11];
      string nm [11];
      cnt = '{n_mul_step, n_mul_first, n_cube, n_cube_fb, n_add, n_acc,
                       n_shift, n_r0_load, n_store, n_repeat, n_loop_back};
      nm = '{"multiply step", "multiply first step", "cubing",
                         "cubing feedback", "addition", "accumulate", "R0 shift",
                         "R0 load", "port B store", "instruction repeat",
             "loop back"};
      for (int i = 0; i < 11; i++) begin
        $display("%-20s %0d", nm[i], cnt[i]);
        checks++;
        if (cnt[i] == 0) begin failures++; $display("FAIL %s never happened", nm[i]); end
      end
    end
    $display("cycles per run: %0d", prog_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
