// tb_gf3m_ppg -- checks the partial product generator: random elements times
// each digit 0, 1, 2 against an integer multiply mod 3, plus digit 1 = copy
// and digit 2 = negation identities.
module tb_gf3m_ppg;
  import tb_gf3_ref_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  elem_t a, p;
  logic [1:0] d;
  gf3m_ppg dut (.a(a), .d(d), .p(p));

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
      d = 2'($urandom_range(0, 2));
      @(posedge clk);
      checks++;
      if (p !== ref_scale(a, int'(d))) begin
        failures++;
        $display("FAIL a=%h d=%0d p=%h", a, d, p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
