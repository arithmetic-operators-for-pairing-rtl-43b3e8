// unified_operator -- processing element for addition, multiplication and
// cubing over F_3[x]/(x^M + x^K + 2), with D = 3 partial product generators.
//
// Registers: R2 and R1 hold m-coefficient operands, R0 is a shift register of
// 3*ceil(m/3) coefficients whose three top coefficients (positions top-2,
// top-1, top) drive the digits of the three partial product generators
// (d0_3i -> PPG0 on R2, d0_3i+1 -> PPG1 on R1, d0_3i+2 -> PPG2 on R2), and
// p(x) is the accumulator / result register.
//
//   mul_mode (c7) = 1:  sum = PPG0 + [x*]PPG1 + x^2*PPG2 + acc
//   mul_mode (c7) = 0:  sum = nu0(PPG0) + [x*]nu1(PPG1) + nu2(PPG2) + acc
//   acc = c10 ? (c9 ? x^3 * p : p) : 0          ([x*] when c8 = 1, all mod f)
//
// Multiplication a*b: a in R0, b in R1 and R2, one cycle with c10 = 0 (which
// takes a_96 * b with the R0 load layout used here), then ceil(m/3)-1 cycles
// with c9 = c10 = 1, shifting R0 each cycle: 33 cycles for m = 97. Addition:
// operands in R2 and R1, the digit triplet in R0 selects the coefficients
// (e.g. (2, 1, 0) gives -a + b). Cubing: a in R1 and R2, triplet (1, 1, 1)
// gives a^3, (2, 2, 2) gives -a^3. R1 and R2 can reload the adder-tree sum
// (c0 = c2 = 0), so that repeated cubings run one per cycle.
//
// The structure, the control bits c0..c10 and their roles follow the
// operator's block diagram. This design's choices: the digit code of gf3_pkg;
// R0 load has priority over shift; the sum fed back to R1/R2 is the
// combinational adder-tree output of the same cycle (the tap sits before the
// p(x) register in the diagram); synchronous active-high reset clears all
// registers. TPS > 1 adds F_3 adders inside the Frobenius networks (the
// document's second packing technique) for polynomials whose cube needs more
// than three terms per coefficient, such as x^97 + x^16 + 2; the default 1
// is plain wiring, enough for x^97 + x^12 + 2. All results appear in p(x) one clock after the control bits.
module unified_operator
  import gf3_pkg::*;
#(
  parameter int unsigned M  = 97,   // extension degree m
  parameter int unsigned K  = 12,   // f(x) = x^M + x^K + 2
  parameter int unsigned TPS = 1,   // terms per Frobenius slot (see gf3m_frob_part)
  parameter int unsigned NG = (M + 2) / 3,  // digit groups in R0 (33)
  parameter int unsigned W0 = 3 * NG        // coefficients held in R0 (99)
) (
  input  logic               clk,
  input  logic               rst,
  input  pe_ctrl_t           ctrl,   // c10..c0
  input  logic [W0-1:0][1:0] d0,     // R0 input (control word or multiplier)
  input  logic [M-1:0][1:0]  d1,     // R1 input
  input  logic [M-1:0][1:0]  d2,     // R2 input
  output logic [M-1:0][1:0]  p       // result register p(x)
);
  logic [W0-1:0][1:0] r0;
  logic [M-1:0][1:0]  r1, r2;

  logic [M-1:0][1:0] pp0, pp1, pp2;             // PPG outputs
  logic [M-1:0][1:0] nu0, nu1, nu2;             // Frobenius slots
  logic [M-1:0][1:0] x1, x2, x3;                // x*, x^2*, x^3* mod f
  logic [M-1:0][1:0] t0, t1, t1x, t2, tacc;     // adder-tree inputs
  logic [M-1:0][1:0] s01, s2a, sum;             // adder-tree nodes

  // Partial product generators, digits from the top of R0.
  gf3m_ppg #(.M(M)) u_ppg0 (.a(r2), .d(r0[W0-3]), .p(pp0));
  gf3m_ppg #(.M(M)) u_ppg1 (.a(r1), .d(r0[W0-2]), .p(pp1));
  gf3m_ppg #(.M(M)) u_ppg2 (.a(r2), .d(r0[W0-1]), .p(pp2));

  // Frobenius wiring networks.
  gf3m_frob_part #(.M(M), .K(K), .IDX(0), .TPS(TPS)) u_nu0 (.a(pp0), .y(nu0));
  gf3m_frob_part #(.M(M), .K(K), .IDX(1), .TPS(TPS)) u_nu1 (.a(pp1), .y(nu1));
  gf3m_frob_part #(.M(M), .K(K), .IDX(2), .TPS(TPS)) u_nu2 (.a(pp2), .y(nu2));

  // Multiplications by x^k mod f.
  gf3m_mulx #(.M(M), .K(K), .S(1)) u_x1 (.a(t1),  .y(x1));
  gf3m_mulx #(.M(M), .K(K), .S(2)) u_x2 (.a(pp2), .y(x2));
  gf3m_mulx #(.M(M), .K(K), .S(3)) u_x3 (.a(p),   .y(x3));

  always_comb begin
    t0   = ctrl.mul_mode  ? pp0 : nu0;
    t1   = ctrl.mul_mode  ? pp1 : nu1;
    t1x  = ctrl.pp1_mulx  ? x1  : t1;
    t2   = ctrl.mul_mode  ? x2  : nu2;
    tacc = ctrl.acc_en    ? (ctrl.acc_mulx3 ? x3 : p) : '0;
  end

  // Adder tree: (t0 + t1x) + (t2 + acc).
  gf3m_add #(.M(M)) u_add01 (.a(t0),  .b(t1x),  .s(s01));
  gf3m_add #(.M(M)) u_add2a (.a(t2),  .b(tacc), .s(s2a));
  gf3m_add #(.M(M)) u_addf  (.a(s01), .b(s2a),  .s(sum));

  always_ff @(posedge clk) begin
    if (rst) begin
      r0 <= '0;
      r1 <= '0;
      r2 <= '0;
      p  <= '0;
    end else begin
      if (ctrl.r0_load)       r0 <= d0;
      else if (ctrl.r0_shift) r0 <= {r0[W0-4:0], 6'b0};
      if (ctrl.r1_load)       r1 <= ctrl.r1_sel_in ? d1 : sum;
      if (ctrl.r2_load)       r2 <= ctrl.r2_sel_in ? d2 : sum;
      if (ctrl.p_en)          p  <= sum;
    end
  end
endmodule
