// tb_gf3m_mulx -- checks multiplication by x, x^2 and x^3 modulo
// x^97 + x^12 + 2 against schoolbook shift-and-reduce, on random operands and
// on x^96 (whose product by x must be 1 + 2x^12).
module tb_gf3m_mulx;
  import tb_gf3_ref_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  elem_t a, y1, y2, y3, e;
  gf3m_mulx #(.M(M), .K(K), .S(1)) dut1 (.a(a), .y(y1));
  gf3m_mulx #(.M(M), .K(K), .S(2)) dut2 (.a(a), .y(y2));
  gf3m_mulx #(.M(M), .K(K), .S(3)) dut3 (.a(a), .y(y3));

  task automatic check(string what, elem_t got, elem_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s a=%h got=%h exp=%h", what, a, got, exp);
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
    a = '0; a[96] = 2'd1;
    @(posedge clk);
    e = '0; e[0] = 2'd1; e[12] = 2'd2;
    check("x*x^96", y1, e);
    for (int n = 0; n < 200; n++) begin
      a = rand_elem();
      @(posedge clk);
      check("x", y1, ref_mulx(a, 1));
      check("x^2", y2, ref_mulx(a, 2));
      check("x^3", y3, ref_mulx(a, 3));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
