// tb_gf3m_frob_part -- checks that the three wiring networks nu_0 + nu_1 +
// nu_2 add up to a(x)^3 mod (x^97 + x^12 + 2) on random operands, that each
// network only copies coefficients, and spot-checks the published split:
// nu_0 = a_0 + a_65 x + a_33 x^2 + ... + a_96 x^94 + a_64 x^95 + a_32 x^96,
// nu_1 = a_89 + a_61 x + ... + a_88 x^94 + a_60 x^95,
// nu_2 = a_93 + a_61 x + ... + a_92 x^94 + a_60 x^95.
// A second set of three networks, for x^97 + x^16 + 2 with two terms per
// slot (TPS = 2, the packing with F_3 adders), is checked against a cube
// computed here for that polynomial, by expanding sum_i a_i x^(3i) and
// reducing with x^97 = 2x^16 + 1.
module tb_gf3m_frob_part;
  import tb_gf3_ref_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  elem_t a, n0, n1, n2;
  gf3m_frob_part #(.M(M), .K(K), .IDX(0)) dut0 (.a(a), .y(n0));
  gf3m_frob_part #(.M(M), .K(K), .IDX(1)) dut1 (.a(a), .y(n1));
  gf3m_frob_part #(.M(M), .K(K), .IDX(2)) dut2 (.a(a), .y(n2));

  localparam int unsigned K2 = 16;
  elem_t p0, p1, p2;
  gf3m_frob_part #(.M(M), .K(K2), .IDX(0), .TPS(2)) dut3 (.a(a), .y(p0));
  gf3m_frob_part #(.M(M), .K(K2), .IDX(1), .TPS(2)) dut4 (.a(a), .y(p1));
  gf3m_frob_part #(.M(M), .K(K2), .IDX(2), .TPS(2)) dut5 (.a(a), .y(p2));

  // a^3 mod (x^M + x^K2 + 2), coefficient by coefficient
  function automatic elem_t cube_k2(elem_t x);
    int c [3*M];
    elem_t r;
    for (int d = 0; d < 3 * M; d++) c[d] = 0;
    for (int i = 0; i < M; i++) c[3*i] = int'(x[i]);
    for (int d = 3 * M - 1; d >= int'(M); d--) begin
      c[d-M+K2] = (c[d-M+K2] + 2 * c[d]) % 3;
      c[d-M]    = (c[d-M] + c[d]) % 3;
      c[d]      = 0;
    end
    for (int j = 0; j < M; j++) r[j] = 2'(c[j]);
    return r;
  endfunction

  task automatic check(string what, logic [1:0] got, logic [1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%0d exp=%0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    elem_t s;
    for (int n = 0; n < 100; n++) begin
      a = rand_elem();
      @(posedge clk);
      s = ref_add(ref_add(n0, n1), n2);
      checks++;
      if (s !== ref_cube(a)) begin
        failures++;
        $display("FAIL cube a=%h", a);
      end
      checks++;
      if (ref_add(ref_add(p0, p1), p2) !== cube_k2(a)) begin
        failures++;
        $display("FAIL cube mod x^97+x^16+2 a=%h", a);
      end
      check("nu0[0]", n0[0], a[0]);    check("nu0[1]", n0[1], a[65]);
      check("nu0[2]", n0[2], a[33]);   check("nu0[94]", n0[94], a[96]);
      check("nu0[95]", n0[95], a[64]); check("nu0[96]", n0[96], a[32]);
      check("nu1[0]", n1[0], a[89]);   check("nu1[1]", n1[1], a[61]);
      check("nu1[94]", n1[94], a[88]); check("nu1[95]", n1[95], a[60]);
      check("nu1[96]", n1[96], 2'd0);  check("nu2[0]", n2[0], a[93]);
      check("nu2[1]", n2[1], a[61]);   check("nu2[94]", n2[94], a[92]);
      check("nu2[95]", n2[95], a[60]); check("nu2[2]", n2[2], 2'd0);
    end
    // a single nonzero coefficient must reach only copies of itself
    for (int i = 0; i < M; i += 7) begin
      a = '0; a[i] = 2'd2;
      @(posedge clk);
      for (int j = 0; j < M; j++) begin
        checks++;
        if (!(n0[j] inside {2'd0, 2'd2}) || !(n1[j] inside {2'd0, 2'd2}) ||
            !(n2[j] inside {2'd0, 2'd2})) begin
          failures++;
          $display("FAIL wiring i=%0d j=%0d", i, j);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
