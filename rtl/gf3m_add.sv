// gf3m_add -- adder over F_{3^m}.
//
// Adds two elements coefficient by coefficient (m additions over F_3 in
// parallel, no carries). Purely combinational. These are the "+" nodes of the
// operator's adder tree.
module gf3m_add
  import gf3_pkg::*;
#(
  parameter int unsigned M = 97
) (
  input  logic [M-1:0][1:0] a,
  input  logic [M-1:0][1:0] b,
  output logic [M-1:0][1:0] s   // a(x) + b(x)
);
  always_comb begin
    for (int i = 0; i < M; i++) s[i] = trit_add(a[i], b[i]);
  end
endmodule
