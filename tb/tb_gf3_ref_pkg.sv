// tb_gf3_ref_pkg -- reference arithmetic over F_3[x]/(x^97 + x^12 + 2) for
// the testbenches, written as plain schoolbook polynomial arithmetic on
// integer coefficients (no shared code with the RTL). Trit code: 0, 1, 2 in
// two bits, coefficient i in bits [2i+1:2i].
package tb_gf3_ref_pkg;
  localparam int M = 97;
  localparam int K = 12;
  typedef logic [M-1:0][1:0] elem_t;

  // Reduce a coefficient vector of degree < 3M modulo f, returning an element.
  function automatic elem_t reduce(int c [3*M]);
    elem_t r;
    for (int d = 3*M - 1; d >= M; d--) begin
      if (c[d] % 3 != 0) begin
        int t = c[d] % 3;
        c[d] = 0;
        c[d - M + K] += 2 * t;   // x^M = -x^K - 2 = 2x^K + 1
        c[d - M]     += t;
      end
    end
    for (int i = 0; i < M; i++) r[i] = 2'(c[i] % 3);
    return r;
  endfunction

  function automatic elem_t ref_add(elem_t a, elem_t b);
    elem_t r;
    for (int i = 0; i < M; i++) r[i] = 2'((int'(a[i]) + int'(b[i])) % 3);
    return r;
  endfunction

  function automatic elem_t ref_scale(elem_t a, int k);
    elem_t r;
    for (int i = 0; i < M; i++) r[i] = 2'((int'(a[i]) * k) % 3);
    return r;
  endfunction

  function automatic elem_t ref_neg(elem_t a);
    return ref_scale(a, 2);
  endfunction

  function automatic elem_t ref_mul(elem_t a, elem_t b);
    int c [3*M];
    for (int i = 0; i < 3*M; i++) c[i] = 0;
    for (int i = 0; i < M; i++)
      for (int j = 0; j < M; j++)
        c[i+j] += int'(a[i]) * int'(b[j]);
    for (int i = 0; i < 2*M; i++) c[i] = c[i] % 3;
    return reduce(c);
  endfunction

  function automatic elem_t ref_cube(elem_t a);
    return ref_mul(ref_mul(a, a), a);
  endfunction

  function automatic elem_t ref_mulx(elem_t a, int s);
    int c [3*M];
    for (int i = 0; i < 3*M; i++) c[i] = 0;
    for (int i = 0; i < M; i++) c[i+s] = int'(a[i]);
    return reduce(c);
  endfunction

  function automatic elem_t ref_one();
    elem_t r = '0;
    r[0] = 2'd1;
    return r;
  endfunction

  function automatic elem_t rand_elem();
    elem_t r;
    for (int i = 0; i < M; i++) r[i] = 2'($urandom_range(0, 2));
    return r;
  endfunction
endpackage
