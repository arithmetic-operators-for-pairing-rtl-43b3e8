// tb_unified_operator -- drives the unified operator's control bits directly
// and checks, against schoolbook reference arithmetic:
//  * multiplication a*b in ceil(97/3) = 33 compute cycles (cycle count checked),
//  * addition with the digit triplet (2, 1, 0): -a + b,
//  * cubing with (1, 1, 1) and (2, 2, 2): a^3 and -a^3,
//  * five back-to-back cubings through the R1/R2 feedback: a^(3^5),
//  * accumulation (c10 = 1, c9 = 0) over several additions.
// A second operator for f = x^97 + x^16 + 2, whose cube needs two terms per
// Frobenius slot (TPS = 2), gets the same inputs; its products and cubes
// are checked against a reference reduced with x^97 = 2x^16 + 1.
module tb_unified_operator;
  import gf3_pkg::*;
  import tb_gf3_ref_pkg::*;
  localparam int W0 = 99;

  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst;
  pe_ctrl_t ctrl;
  logic [W0-1:0][1:0] d0;
  elem_t d1, d2, p;

  unified_operator dut (.clk, .rst, .ctrl, .d0, .d1, .d2, .p);

  localparam int K2 = 16;
  elem_t p16;
  unified_operator #(.K(K2), .TPS(2)) dut16 (.clk, .rst, .ctrl, .d0, .d1, .d2, .p(p16));

  // Reduction of a coefficient list of degree < 2M by x^M + x^K2 + 2.
  function automatic elem_t red16(int c [2*M]);
    elem_t r;
    for (int d = 2 * M - 1; d >= M; d--) begin
      c[d-M+K2] = (c[d-M+K2] + 2 * c[d]) % 3;
      c[d-M]    = (c[d-M] + c[d]) % 3;
    end
    for (int j = 0; j < M; j++) r[j] = 2'(c[j] % 3);
    return r;
  endfunction

  function automatic elem_t mul16(elem_t a, elem_t b);
    int c [2*M];
    for (int d = 0; d < 2 * M; d++) c[d] = 0;
    for (int i = 0; i < M; i++)
      for (int j = 0; j < M; j++) c[i+j] = (c[i+j] + int'(a[i]) * int'(b[j])) % 3;
    return red16(c);
  endfunction

  function automatic elem_t cube16(elem_t a);
    return mul16(a, mul16(a, a));
  endfunction

  task automatic check(string what, elem_t got, elem_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%h exp=%h", what, got, exp);
    end
  endtask

  // One clock with the given control bits.
  task automatic step(pe_ctrl_t c);
    ctrl = c;
    @(posedge clk);
    #1 ctrl = '0;
  endtask

  // Control word whose top groups are the given triplets (d0_3i, d0_3i+1, d0_3i+2).
  function automatic logic [W0-1:0][1:0] cword(int g [], int n);
    logic [W0-1:0][1:0] w = '0;
    for (int k = 0; k < n; k++) begin
      w[W0-3-3*k] = 2'(g[3*k]);
      w[W0-2-3*k] = 2'(g[3*k+1]);
      w[W0-1-3*k] = 2'(g[3*k+2]);
    end
    return w;
  endfunction

  task automatic load(elem_t r2v, elem_t r1v, logic [W0-1:0][1:0] r0v);
    pe_ctrl_t c = '0;
    d2 = r2v; d1 = r1v; d0 = r0v;
    c.r2_sel_in = 1; c.r2_load = 1; c.r1_sel_in = 1; c.r1_load = 1; c.r0_load = 1;
    step(c);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    elem_t a, b, exp;
    pe_ctrl_t c;
    int cycles;
    ctrl = '0; d0 = '0; d1 = '0; d2 = '0;
    rst = 1;
    repeat (2) @(posedge clk);
    #1 rst = 0;

    // ---- multiplication ----
    for (int n = 0; n < 6; n++) begin
      a = rand_elem(); b = rand_elem();
      if (n == 0) begin a = '0; a[0] = 2'd1; end          // 1 * b
      load(b, b, {4'b0, a});
      cycles = 0;
      c = '0; c.r0_shift = 1; c.p_en = 1; c.mul_mode = 1; c.pp1_mulx = 1;
      step(c); cycles++;
      c.acc_mulx3 = 1; c.acc_en = 1;
      while (cycles < 33) begin step(c); cycles++; end
      check("mul", p, ref_mul(a, b));
      check("mul mod x^97+x^16+2", p16, mul16(a, b));
      checks++;
      if (cycles != 33) begin failures++; $display("FAIL mul cycles %0d", cycles); end
    end

    // ---- addition -a + b ----
    for (int n = 0; n < 5; n++) begin
      a = rand_elem(); b = rand_elem();
      load(a, b, cword('{2, 1, 0}, 1));
      c = '0; c.p_en = 1; c.mul_mode = 1;
      step(c);
      check("-a+b", p, ref_add(ref_neg(a), b));
    end

    // ---- cubing, both signs ----
    for (int n = 0; n < 5; n++) begin
      a = rand_elem();
      load(a, a, cword('{1, 1, 1, 2, 2, 2}, 2));
      c = '0; c.p_en = 1; c.r0_shift = 1;
      step(c);
      check("a^3", p, ref_cube(a));
      check("a^3 mod x^97+x^16+2", p16, cube16(a));
      step(c);
      check("-a^3", p, ref_neg(ref_cube(a)));
      check("-a^3 mod x^97+x^16+2", p16, ref_neg(cube16(a)));
    end

    // ---- consecutive cubings through the feedback path ----
    a = rand_elem();
    load(a, a, cword('{1, 1, 1}, 1));
    c = '0; c.p_en = 1; c.r1_load = 1; c.r2_load = 1;  // sel_in = 0: feedback
    repeat (5) step(c);
    exp = a;
    repeat (5) exp = ref_cube(exp);
    check("a^(3^5)", p, exp);
    exp = a;
    repeat (5) exp = cube16(exp);
    check("a^(3^5) mod x^97+x^16+2", p16, exp);

    // ---- accumulation: p = a + b + 2a (c10 = 1, c9 = 0) ----
    a = rand_elem(); b = rand_elem();
    load(a, b, cword('{1, 1, 0, 2, 0, 0}, 2));
    c = '0; c.p_en = 1; c.mul_mode = 1; c.r0_shift = 1;
    step(c);
    c.acc_en = 1;
    step(c);
    check("acc", p, ref_add(ref_add(a, b), ref_scale(a, 2)));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
