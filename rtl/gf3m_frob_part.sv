// gf3m_frob_part -- one of the three networks nu_0, nu_1, nu_2 that split
// the Frobenius map (cubing) over F_3[x]/(x^M + x^K + 2).
//
// Cubing is linear: a(x)^3 mod f = sum_i a_i x^(3i) mod f. Reduced, each
// output coefficient j is a small sum of input coefficients, some counted
// twice. Writing a doubled term as two single ones gives a list of terms per
// j. The first term is the leading one, a_{(j/3) mod M}; the others follow in
// increasing order of i. Term q of that list goes to slot q mod 3, so that
// a(x)^3 = nu_0(a) + nu_1(a) + nu_2(a). With TPS = 1 (one term per slot, the
// default) every nu_k only copies coefficients or gives 0: wiring, no logic,
// and nu_0 is a permutation. For f = x^97 + x^12 + 2 this yields the
// published split nu_0 = a_0 + a_65 x + a_33 x^2 + ..., nu_1 = a_89 +
// a_61 x + ..., nu_2 = a_93 + a_61 x + ...
// Some polynomials (x^97 + x^16 + 2, x^193 + x^64 + 2) need more than three
// terms for some coefficients. The document's second packing technique then
// adds F_3 adders inside a slot: with TPS = n each slot sums up to n terms
// (term q goes to position q / 3 of slot q mod 3), and the operator still
// needs only three partial product generators. Since every slot is linear,
// nu_k(d * a) = d * nu_k(a), so it can follow a partial product generator.
// The choice of which terms share a slot is this design's own.
// The map is worked out at elaboration time by the function below; an
// elaboration error reports a polynomial that needs more than 3 * TPS terms.
// Combinational; IDX selects which slot this instance builds. With TPS = 1 a
// synthesis tool reports every output bit as driven straight from an input;
// that is the intent, not a fault.
module gf3m_frob_part
  import gf3_pkg::*;
#(
  parameter int unsigned M   = 97,
  parameter int unsigned K   = 12,
  parameter int unsigned IDX = 0,   // 0, 1 or 2: which nu_k
  parameter int unsigned TPS = 1    // terms per slot (1: pure wiring)
) (
  input  logic [M-1:0][1:0] a,
  output logic [M-1:0][1:0] y      // nu_IDX(a)
);
  typedef int map_t [M*TPS];

  // Source coefficient of position t of slot IDX for output coefficient j,
  // at index t * M + j; -1 for none.
  function automatic map_t build_map();
    int   e    [M];   // x^(3i) mod f for the current i
    int   n    [M];   // terms placed so far for each output coefficient
    int   lead [M];   // leading source of each output coefficient
    map_t m;
    int   top, c, inv3, q;
    inv3 = 0;
    for (int t = 0; t < M; t++) if ((3 * t) % M == 1) inv3 = t;
    for (int j = 0; j < M * TPS; j++) m[j] = -1;
    for (int j = 0; j < M; j++) begin
      n[j]    = 1;               // term 0 is kept for the leading source
      lead[j] = (j * inv3) % M;
      e[j]    = 0;
    end
    e[0] = 1;
    for (int i = 0; i < M; i++) begin
      for (int j = 0; j < M; j++) begin
        c = e[j];
        if (c != 0 && i == lead[j]) begin
          if (IDX == 0) m[j] = i;
          c = c - 1;
        end
        while (c != 0) begin
          q = n[j];
          if (q % 3 == int'(IDX) && q / 3 < int'(TPS)) m[(q / 3) * M + j] = i;
          n[j]++;
          c--;
        end
      end
      for (int s = 0; s < 3; s++) begin  // e <- x * e mod f
        top = e[M-1];
        for (int j = M - 1; j > 0; j--) e[j] = e[j-1];
        e[0] = top;                        // x^M = 1 + 2x^K
        e[K] = (e[K] + 2 * top) % 3;
      end
    end
    for (int j = 0; j < M; j++)
      if (n[j] > 3 * int'(TPS))
        $error("gf3m_frob_part: coefficient %0d of a^3 needs %0d terms", j, n[j]);
    return m;
  endfunction

  localparam map_t MAP = build_map();

  always_comb begin
    for (int j = 0; j < M; j++) begin
      y[j] = (MAP[j] < 0) ? T0 : a[MAP[j]];
      for (int t = 1; t < TPS; t++)
        if (MAP[t*M + j] >= 0) y[j] = trit_add(y[j], a[MAP[t*M + j]]);
    end
  end
endmodule
