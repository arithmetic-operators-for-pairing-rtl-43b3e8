// gf3m_mulx -- multiplication by x^S followed by reduction modulo
// f(x) = x^M + x^K + 2 over F_3.
//
// The shift is wiring; the S coefficients pushed past degree M-1 are folded
// back with x^M = 2x^K + 1 (mod f, mod 3), which costs at most S additions
// over F_3 at positions K..K+S-1 and a copy into positions 0..S-1. Needs
// S <= K so that folded terms never land above degree M-1 twice.
// Purely combinational. The operator uses S = 1, 2 and 3. All output bits
// but the 2S folded coefficients are plain wires from the input.
module gf3m_mulx
  import gf3_pkg::*;
#(
  parameter int unsigned M = 97,  // degree of f
  parameter int unsigned K = 12,  // middle exponent of the trinomial f
  parameter int unsigned S = 1    // power of x
) (
  input  logic [M-1:0][1:0] a,
  output logic [M-1:0][1:0] y    // x^S * a(x) mod f(x)
);
  always_comb begin
    for (int i = 0; i < M; i++) y[i] = (i >= S) ? a[i-S] : T0;
    // a[M-S+j] * x^(M+j) = a[M-S+j] * x^j * (2x^K + 1)
    for (int j = 0; j < S; j++) begin
      y[j]     = trit_add(y[j], a[M-S+j]);
      y[K + j] = trit_add(y[K + j], trit_mul(T2, a[M-S+j]));
    end
  end

  initial begin
    assert (S >= 1 && S <= K && K + S <= M)
      else $error("gf3m_mulx: unsupported S=%0d K=%0d M=%0d", S, K, M);
  end
endmodule
