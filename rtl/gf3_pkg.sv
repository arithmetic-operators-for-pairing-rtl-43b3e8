// gf3_pkg -- shared types and helpers for the F_3[x]/(f(x)) pairing coprocessor.
//
// Elements of F_3 (trits) are held in two bits with the plain binary code
// 0 = 2'b00, 1 = 2'b01, 2 = 2'b10; 2'b11 never occurs on a well-formed bus and
// is treated like 0 by the helpers below. An element of F_{3^m} is a packed
// array of m trits, coefficient i of x^i in bits [2i+1:2i]. The trit code is a
// choice of this design: only the 2-bit width per coefficient is fixed by the
// bus widths of the accelerator (194 bits for 97 coefficients).
//
// The package also defines the 11 control bits of the unified operator
// (c0..c10) and the 32-bit instruction word of the control unit
// (c10..c0 = operator, c17..c11 = port A address, c24..c18 = port B address,
// c25 = port B write enable, c31..c26 = repeat counter), as laid out in the
// accelerator's instruction format. Two encodings are reserved by this
// design: all ones is HALT, and an all-ones operator field with c25 = 0 is a
// LOOP instruction (see ctrl_fsm).
package gf3_pkg;

  typedef logic [1:0] trit_t;

  localparam trit_t T0 = 2'd0;
  localparam trit_t T1 = 2'd1;
  localparam trit_t T2 = 2'd2;

  // Addition modulo 3; a table lookup in hardware.
  function automatic trit_t trit_add(trit_t a, trit_t b);
    logic [2:0] s;
    s = {1'b0, (a == 2'd3) ? 2'd0 : a} + {1'b0, (b == 2'd3) ? 2'd0 : b};
    return (s >= 3'd3) ? trit_t'(s - 3'd3) : trit_t'(s);
  endfunction

  // Multiplication modulo 3.
  function automatic trit_t trit_mul(trit_t a, trit_t b);
    if (a == T0 || b == T0 || a == 2'd3 || b == 2'd3) return T0;
    return (a == b) ? T1 : T2;
  endfunction

  // Negation modulo 3 (0 -> 0, 1 -> 2, 2 -> 1).
  function automatic trit_t trit_neg(trit_t a);
    case (a)
      T1:      return T2;
      T2:      return T1;
      default: return T0;
    endcase
  endfunction

  // Control bits of the unified operator, c10 in the MSB, c0 in the LSB.
  typedef struct packed {
    logic acc_en;      // c10: 1 = accumulator term enters the adder tree, 0 = masked
    logic acc_mulx3;   // c9 : 1 = accumulator multiplied by x^3 mod f, 0 = as is
    logic pp1_mulx;    // c8 : 1 = second partial product multiplied by x mod f
    logic mul_mode;    // c7 : 1 = multiplication paths, 0 = Frobenius (nu) paths
    logic p_en;        // c6 : 1 = result register p(x) loads the adder-tree sum
    logic r0_load;     // c5 : load shift register R0 from d0(x)
    logic r0_shift;    // c4 : shift R0 by one group of three coefficients
    logic r1_load;     // c3 : load R1
    logic r1_sel_in;   // c2 : 1 = R1 takes d1(x), 0 = R1 takes the adder-tree sum
    logic r2_load;     // c1 : load R2
    logic r2_sel_in;   // c0 : 1 = R2 takes d2(x), 0 = R2 takes the adder-tree sum
  } pe_ctrl_t;

  // One instruction of the control unit (32 bits).
  typedef struct packed {
    logic [5:0] count;   // c31..c26: the instruction runs count+1 times
    logic       wen_b;   // c25: write p(x) to port B
    logic [6:0] addr_b;  // c24..c18
    logic [6:0] addr_a;  // c17..c11
    pe_ctrl_t   ctrl;    // c10..c0
  } instr_t;

  // Loop instruction: operator field all ones with port B write enable low.
  // Its address fields {addr_b[2:0], addr_a} hold the 10-bit target and its
  // count field the number of extra passes (iterations - 1).
  localparam logic [10:0] LOOP_CTRL = 11'h7FF;

  // Word that ends a program (used by the control FSM and the ROM; a lint
  // of a module that imports the package without using it reports it unused).
  localparam logic [31:0] INSTR_HALT = 32'hFFFF_FFFF;

endpackage
