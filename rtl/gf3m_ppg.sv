// gf3m_ppg -- partial product generator of the unified operator.
//
// Multiplies every coefficient of a(x) in F_{3^m} by one trit d, m
// multiplications over F_3 in parallel (a lookup table per coefficient).
// Purely combinational. d = 0 gives 0, d = 1 gives a(x), d = 2 gives -a(x).
module gf3m_ppg
  import gf3_pkg::*;
#(
  parameter int unsigned M = 97  // extension degree m
) (
  input  logic [M-1:0][1:0] a,   // multiplicand, coefficient i in a[i]
  input  trit_t             d,   // multiplier digit
  output logic [M-1:0][1:0] p    // d * a(x)
);
  always_comb begin
    for (int i = 0; i < M; i++) p[i] = trit_mul(a[i], d);
  end
endmodule
