// tb_gf3m_add -- checks the F_{3^m} adder against integer addition mod 3 on
// random operands, and a + (-a) = 0.
module tb_gf3m_add;
  import tb_gf3_ref_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  elem_t a, b, s;
  gf3m_add dut (.a(a), .b(b), .s(s));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 200; n++) begin
      a = rand_elem();
      b = (n % 10 == 0) ? ref_neg(a) : rand_elem();
      @(posedge clk);
      checks++;
      if (s !== ref_add(a, b) || (n % 10 == 0 && s !== '0)) begin
        failures++;
        $display("FAIL a=%h b=%h s=%h", a, b, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
