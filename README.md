# A compact eta_T pairing coprocessor over F(3^97)

This is SystemVerilog RTL for a small coprocessor that does arithmetic for the
eta_T pairing on the supersingular curve y^2 = x^3 - x + 1 over
F(3^97) = F_3[x] / (x^97 + x^12 + 2).

Fast pairing accelerators use many field multipliers in parallel. This design
takes the opposite approach and spends as little area as possible:

- It has one **unified operator** that does addition, multiplication and cubing
  over F(3^97).
- A dual-port RAM serves as its register file.
- A small control unit feeds it: an instruction ROM plus a sequencer FSM.

Every higher-level operation of the pairing is a sequence of these three field
operations. That includes arithmetic in the degree-6 extension F(3^(6*97)),
point tripling and inversion. So the hardware stays fixed and the work moves
into the instruction program.

The architecture (block structure, control bits, bus widths, instruction
format) follows a published FPGA design, where it reached 1888 Virtex-II Pro
slices at 147 MHz. The programs, the pipeline timing rules and all details
that design leaves open are this implementation's own. They are listed under
"Departures and limits".

## Representing F(3^97)

An element is a polynomial of degree below 97 with coefficients in F_3. Each
coefficient is a 2-bit *trit*, coded 0 = `00`, 1 = `01` and 2 = `10`.
Coefficient i sits in bits [2i+1:2i], so an element is a 194-bit bus,
`logic [96:0][1:0]`. Reduction uses x^97 = 2x^12 + 1 (mod 3).

RAM words are 198 bits, which is 99 trits. The extra two trits exist because
the shift register R0 holds 33 groups of three digits (see below). Elements
stored in RAM carry zeros in the top 4 bits.

## The unified operator (`unified_operator`)

The operator has these registers:

- **R2 and R1**: 97-trit operands. Each loads either from the RAM (d2, d1) or
  from the operator's own adder-tree output (the feedback path).
- **R0**: a 99-trit shift register loaded from d0. Its top three trits, at
  positions 96, 97 and 98, are the digits of three partial product
  generators (PPGs):
  - PPG0 multiplies R2 by trit 96.
  - PPG1 multiplies R1 by trit 97.
  - PPG2 multiplies R2 by trit 98.

  A shift moves R0 up by three trits.
- **p(x)**: the result register. It also serves as the accumulator.

Each PPG output goes through a 2:1 multiplexer, and the three results and the
accumulator meet in a three-adder tree:

```
c7=1 (multiply):  sum = PPG0 + [x*]PPG1 + x^2*PPG2 + acc
c7=0 (cube):      sum = nu0(PPG0) + [x*]nu1(PPG1) + nu2(PPG2) + acc
acc = c10 ? (c9 ? x^3*p : p) : 0          ([x*] applied when c8 = 1; all mod f)
```

| bit | name (`pe_ctrl_t`) | effect when 1 |
|-----|--------------------|---------------|
| c0  | `r2_sel_in` | R2 takes d2 (0: takes the adder-tree sum) |
| c1  | `r2_load`   | load R2 |
| c2  | `r1_sel_in` | R1 takes d1 (0: takes the sum) |
| c3  | `r1_load`   | load R1 |
| c4  | `r0_shift`  | shift R0 by one digit group |
| c5  | `r0_load`   | load R0 from d0 (wins over c4) |
| c6  | `p_en`      | p(x) takes the sum |
| c7  | `mul_mode`  | multiplication paths (0: Frobenius paths) |
| c8  | `pp1_mulx`  | multiply the PPG1 path by x |
| c9  | `acc_mulx3` | multiply the accumulator by x^3 |
| c10 | `acc_en`    | add the accumulator (0: mask it) |

The operator supports three operations.

**Multiplication a*b** takes 33 cycles, which is ceil(97/3).

1. Load b into R1 and R2, and a into R0.
2. The first cycle (c4, c6, c7, c8 set; c10 = 0) gives p = a_96 * b.
3. Each of the next 32 cycles (c9 and c10 also set) computes:
   p <- x^3 p + a_{3i+2} x^2 b + a_{3i+1} x b + a_{3i} b

**Addition and linear combinations** hold the operands in R2 and R1 and put a
digit triplet (d_3i, d_3i+1, d_3i+2) at the top of R0, with c7 = 1 and
c8 = 0. The result is d_3i*R2 + d_3i+1*R1 + x^2*d_3i+2*R2. The third digit is
kept 0, so for example (2, 1, 0) gives -a + b. With c10 = 1 and c9 = 0 the
result adds onto p. This lets a sequence of such steps build any signed sum.

A 99-trit R0 holds up to 33 triplets, one per step. Such a word is called a
**control word**. Control words are stored in RAM like any operand.

**Cubing** relies on the fact that cubing is linear over F_3.
a(x)^3 mod f = sum_i a_i x^(3i) mod f. After reduction, every output
coefficient is a sum of at most three input coefficients, counting a doubled
term twice. So a^3 = nu0(a) + nu1(a) + nu2(a), where each nu_k is pure wiring:
it copies a coefficient or gives 0.

`gf3m_frob_part` works out this wiring during elaboration from f(x). For
x^97 + x^12 + 2 it gives:

- nu0 = a_0 + a_65 x + a_33 x^2 + ... (a permutation)
- nu1 = a_89 + a_61 x + ...
- nu2 = a_93 + a_61 x + ...

Not every trinomial splits this way. For x^97 + x^16 + 2 and
x^193 + x^64 + 2, some output coefficients of the cube are sums of up to six
input terms. The parameter `TPS` (terms per slot, default 1) handles this:
each nu_k then adds up to `TPS` coefficients with small F_3 adders, and term
q of a coefficient goes to slot q mod 3. With `K = 16, TPS = 2` the operator
is unchanged apart from those adders, and the operator testbench checks it
for x^97 + x^16 + 2. If a polynomial needs more than 3 * `TPS` terms,
elaboration stops with an error.

To cube, load a into R1 and R2 and set the digit triplet to (1,1,1) for a^3,
or to (2,2,2) for -a^3. With c0 = c2 = 0, R1 and R2 reload the sum in the
same clock. A repeated instruction therefore computes a^(3^n) at one cubing
per cycle.

## The coprocessor (`eta_t_coprocessor`)

```
 host: sel, host_addr, host_we, host_din ─┐
                                          ▼
        ┌──────── RAM port A (read: d2, q_a) ────────┐
 ROM ─► FSM ─ addresses / we_b ─► dual-port RAM 128x198   unified operator ─► p(x)
        └── c10..c0 (delayed 1 clk) ────────────────────►  ▲ d1, d0 from port B
                                   port B write data ◄── p(x)
```

The RAM is 128 words of 198 bits with two synchronous ports:

- **Port A** feeds d2. It is also the host's port: while `sel` = 1, the host
  drives its address and write enable.
- **Port B** feeds d1 (the low 194 bits) and d0 (all 198 bits). It is the only
  port the program writes, and it always writes p(x).

Because d1 and d0 both come from port B, R1 and R0 need separate load cycles.

**Instruction word (32 bits):**

| c31..c26 | c25 | c24..c18 | c17..c11 | c10..c0 |
|---|---|---|---|---|
| count | port B write enable | port B address | port A address | operator control |

An instruction runs `count + 1` times in consecutive cycles, so all 32
accumulate steps of a multiplication fit in one instruction. The word
`FFFFFFFF` ends a program. Unused ROM words read as this value.

A word whose operator field is all ones (`7FF`) and whose write enable is 0
is a **LOOP**. It does not touch the operator or the RAM. Instead it jumps
back to ROM address {port B address[2:0], port A address} (10 bits), and it
does so `count` times; the next time it is reached it falls through and its
counter clears. A loop body therefore runs `count + 1` times. There is one
loop counter, so loops cannot be nested. Each LOOP visit costs one cycle.

**Timing rules for program writers.** This is the subtle part of the design.

1. The FSM issues an instruction's RAM addresses in cycle t. The RAM returns
   the data in cycle t+1, and the FSM delays the control bits by one clock, so
   the operator acts on that data in cycle t+1.
2. A load instruction therefore makes the new register value usable by the
   next instruction.
3. A port B write in cycle t stores p(x) as it is during cycle t. p(x) is
   updated at the end of the cycle in which the control bits act. So a store
   must come at least **two** instructions after the instruction that last
   set p(x). The programs below put one filler instruction in between.
4. From `start`, a run takes 3 + sum(count + 1) cycles until `done` is seen,
   where the sum is over every instruction executed (a loop body counts
   once per pass) and every LOOP visit adds 1. `done` stays high until the
   next `start`.
5. The operator registers keep their values across a LOOP, but the LOOP
   sends no control bits, so nothing can be stored or loaded in its cycle.

**Host protocol:**

1. Hold `sel` = 1 and write the inputs, constants and control words through
   port A (`host_addr`, `host_we`, `host_din`).
2. Drop `sel` and pulse `start`.
3. Wait for `done`.
4. Raise `sel` again and read results: `q_a` shows the word at `host_addr`
   one cycle later.

An assertion flags `sel` = 1 during a run.

## Programs

The programs and their RAM constants are hex files. The ROM loads its
program through the `PROGRAM` parameter of the top. Bit 2i+1:2i of a RAM
word is trit i. A control word whose steps are (a_k, b_k, c_k), k = 0, 1, ...,
places a_k at trit 96-3k, b_k at trit 97-3k and c_k at trit 98-3k.

### `rtl/eta_t_program.hex`: the eta_T pairing up to the final exponentiation, 467 instructions

The program follows the eta_T algorithm for b = 1 with m = 97. The
degree-6 extension uses the basis (1, s, r, sr, r^2, sr^2) with s^2 = -1
and r^3 = r + 1. An element is written as (a0, ..., a5) in that order.
It computes:

1. **Point tripling.** A loop body that runs 48 times:
   x_p <- x_p^9 - 1, y_p <- -y_p^9. This gives [3^48]P.
2. y_p <- -y_p, d = 1 (address 5), r0 = x_p + x_q + d.
3. **First product.** A = R0*R1 with 8 multiplications, exploiting the
   sparse form of both factors:
   - e0 = r0^2, e1 = y_q r0, e2 = y_p r0, e3 = e0 e2
   - e4 = y_p y_q, e5 = e4 y_q, e6 = e4 y_p
   - e9 = (-e2 + y_q)(-e0 + e4)
   - a0 = e3 - e5 - y_p, a1 = e9 - e3 - e5, a2 = -y_p
   - a3 = -e1 + e6, a4 = 0, a5 = -y_q
4. **Cube.** OUT = A^3. With c_i = a_i^3 the coefficients are:
   - 1: c0 + c2 + c4
   - s: -(c1 + c3 + c5)
   - r: c2 - c4
   - sr: c5 - c3
   - r^2: c4
   - sr^2: -c5
5. **Miller loop.** A loop body that runs 48 times and updates everything in
   place:
   - y_p <- -y_p, x_q <- x_q^9, y_q <- y_q^9, d <- d - 1
   - r0 = x_p + x_q + d
   - OUT <- (OUT * R1)^3, where R1 = -r0^2 + y_p y_q s - r0 r - r^2.

The product in step 5 takes 13 multiplications plus two more for
rr = r0^2 and v = y_p y_q, so 15 per pass. It groups the coefficients by
powers of r. Then A_k = a_2k + a_2k+1 s, C0 = -rr + v s, C1 = -r0 and
C2 = -1, and the product is:

- (A0 + A1 r + A2 r^2)(C0 + C1 r - r^2)

The four products that need real work are:

| product | how | multiplications |
|---|---|---|
| A0 C0 | k1 = a0 rr, k2 = a1 v, k3 = (a0 + a1)(v - rr) | 3 |
| A1 C1 | m2 = r0 a2, m3 = r0 a3 | 2 |
| A2 C0 | q1 = a4 rr, q2 = a5 v, q3 = (a4 + a5)(v - rr) | 3 |
| A2 C1 | n4 = r0 a4, n5 = r0 a5 | 2 |

Three more multiplications give (A0 + A1)(C0 + C1), Karatsuba style:

- h1 = (a0 + a2)(-rr - r0)
- h2 = (a1 + a3) v
- h3 = (a0 + a1 + a2 + a3)(-rr - r0 + v)

From these it recovers A0 C1 + A1 C0. The products with C2 = -1 are only
negations. Reducing r^3 = r + 1 and r^4 = r^2 + r gives B = OUT * R1 as
signed sums (each is one chain of accumulate steps under a control word):

- b0 = -k1 - k2 - n4 - a2
- b1 = k3 + k1 - k2 - n5 - a3
- b2 = h1 - h2 + k1 + k2 + m2 - n4 - a2 - a4
- b3 = h3 - h1 - h2 - k3 - k1 + k2 + m3 - n5 - a3 - a5
- b4 = -m2 - q1 - q2 - a0 - a4
- b5 = -m3 + q3 + q1 - q2 - a1 - a5

OUT is then B^3, computed as in step 4. The loop totals are 8 + 15 * 48 = 728
multiplications and 192 + 486 cubings.

After a run, OUT holds the Miller-loop result: the value the final
exponentiation would take as its input.

One run takes 36,904 cycles, including the start and drain cycles.

| RAM address | content |
|---|---|
| 0, 1, 2, 3 | x_p, y_p, x_q, y_q. Written by the host and updated in place. |
| 4 | the constant 1 (host) |
| 5 | d |
| 8 | r0 |
| 10..19 | e0..e9, temporaries of step 3 |
| 16..21 | OUT: coefficients 1, s, r, sr, r^2, sr^2 |
| 24..29 | A, the first product |
| 30..35 | B = OUT * R1 inside the loop |
| 40..62 | loop temporaries (rr, v, k1..h3 and the operand sums) |
| 64..81 | 18 control words (host, from `rtl/eta_t_constants.hex`) |
| 100..105 | cubed coefficients during a cube in F(3^(6m)) |

The e-temporaries at 16..19 are overwritten by OUT after use.

### `rtl/inversion_program.hex`: inversion in F(3^97), 95 instructions

This program computes a^-1 = a^(3^97 - 2) as an addition chain on
96 = 2^6 + 2^5:

1. y_{i+1} = y_i^(3^(2^i)) * y_i for i = 0..5.
2. y_7 = y_6^(3^32) * y_5.
3. Return a * (y_7^2)^3.

It costs 96 cubings and 9 multiplications, 464 cycles per run.

Its RAM layout:

- The input is at address 0 and the result at 16.
- Temporaries are at 8..17 and 40..46.
- One control word, (1,1,1), is at address 64 (`rtl/inversion_constants.hex`).

## Files

| file | content |
|---|---|
| `rtl/gf3_pkg.sv` | trit type and helpers, `pe_ctrl_t`, `instr_t`, HALT word |
| `rtl/gf3m_ppg.sv` | partial product generator (element times trit) |
| `rtl/gf3m_frob_part.sv` | nu_k wiring for cubing, derived from f(x) at elaboration |
| `rtl/gf3m_mulx.sv` | multiplication by x^S mod f |
| `rtl/gf3m_add.sv` | coefficient-wise adder |
| `rtl/unified_operator.sv` | the processing element |
| `rtl/dp_ram.sv` | dual-port register file |
| `rtl/instr_rom.sv` | instruction ROM, loaded from a hex file |
| `rtl/ctrl_fsm.sv` | sequencer |
| `rtl/eta_t_coprocessor.sv` | top level |
| `rtl/*.hex` | the two programs and their RAM constants |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_eta_t_inversion` |
| `tb/tb_gf3_ref_pkg.sv` | schoolbook reference arithmetic used by the testbenches |

## Simulating

Run from the directory that holds `rtl/` and `tb/`, because the hex files are
opened by relative paths such as `rtl/eta_t_program.hex`:

```
verilator --binary --timing --assert rtl/gf3_pkg.sv tb/tb_gf3_ref_pkg.sv rtl/*.sv \
    tb/tb_eta_t_coprocessor.sv --top-module tb_eta_t_coprocessor -o sim
./obj_dir/sim
```

For another testbench, change the last file and the top module. Every
testbench ends with `TB_RESULT checks=N failures=M`.

Elaborating a module that contains `gf3m_frob_part` takes a few seconds and
about 1.2 GB of memory, because the cube wiring is computed by a constant
function. The cost grows with the square of `M`: three networks at M = 193
take about 9 GB.

## How far it is verified

Each module's testbench compares it with reference arithmetic written
independently: schoolbook polynomial products with explicit reduction.

- **Operator**: products, sums, signed cubes, five chained cubings, and
  accumulation. Products and cubes are also checked for x^97 + x^16 + 2
  with `TPS = 2`. The testbench also checks that a multiplication takes
  exactly 33 cycles.
- **Top level**: two random input sets, run through the full program. Each
  run checks x_p, y_p, x_q, y_q, d, r0 and all six output coefficients.
  These come from an independent model that multiplies in F(3^(6m))
  schoolbook style (36 products, then reduction by s^2 = -1 and
  r^3 = r + 1). The testbench also counts every multiplication (728) and
  cubing (678) the operator performs.
- **Program timing**: the cycle count of each run is checked against the
  program.
- **Coverage**: the top-level testbench checks that every mechanism ran at
  least once: multiply steps, cubing, cubing feedback, additions,
  accumulation, R0 load and shift, stores, instruction repeats and LOOP
  jumps.
- **Inversion**: checked by a * a^-1 = 1, and by counting exactly 96 cubings
  and 9 multiplications.

Each testbench was also run against a deliberately broken copy of its module
and reported failures. Nothing has been tried on an FPGA, and no timing
analysis has been done.

## Departures and limits

- **Pairing coverage.** The final exponentiation and the 3^m-th root at the
  end are not programmed. Their algorithms come from other work and are not
  reproduced here. The inversion that the final exponentiation needs is
  available as its own program. The published design fits the whole
  pairing in 895 instructions. This program uses 467 for everything before
  the final exponentiation.
- **Loop instruction and the 13-multiplication product.** Both are this
  design's own. The published design says only that its sequencer is
  "slightly more complex" and that the product takes 13 multiplications.
- **Fixed structure.** The design has D = 3 partial product generators and
  works only in characteristic 3. `M` and `K` are parameters, but only
  trinomials x^M + x^K + 2 are supported. The pairing program assumes
  m = 97.
- **Design choices of this implementation.** The following were decided here:
  - the trit code;
  - synchronous active-high reset of the operator registers and FSM (RAM
    contents are not reset);
  - the RAM's read-first behaviour;
  - the one-clock control delay and the store rule;
  - the HALT word and `done` staying high;
  - the LOOP encoding;
  - which terms share a Frobenius slot when `TPS` > 1;
  - `count + 1` executions per instruction;
  - R0 load winning over shift.
- **Host interface.** The design has no serial interface. The host interface
  is parallel RAM port A, with a 198-bit write bus and a 194-bit read bus.
- **Cycle counts.** These differ from the published design, whose programs
  were hand-scheduled. Its operation counts for the same steps (2,467
  additions, 678 cubings, 728 multiplications of 33 cycles and 1,359 idle
  cycles) add up to about 28,500 cycles, against 36,904 here. The gap is
  load and store overhead: every store costs a filler cycle, and every
  multiplication or cubing needs its own operand loads.
