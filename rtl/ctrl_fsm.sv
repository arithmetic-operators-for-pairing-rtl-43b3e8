// ctrl_fsm -- finite state machine of the pairing coprocessor's control unit.
//
// It steps through the instruction memory: every instruction drives the RAM
// port A read address, the port B address and write enable, and the 11
// control bits of the processing element, and is issued count+1 times in a
// row (count = bits c31..c26), so that e.g. the 32 accumulate steps of a
// multiplication take one instruction.
//
// Timing (this design's choice): an instruction is issued to the RAM in cycle
// t; the RAM returns the operands in cycle t+1, so the FSM delays the control
// bits by one clock and the operator acts in cycle t+1.
//
// Loops (this design's own encoding of the sequencer's looping ability): an
// instruction whose operator field is all ones and whose port B write enable
// is 0 is a LOOP. It takes one cycle, touches neither RAM nor operator, and
// jumps back to address {addr_b[2:0], addr_a} until it has done so 'count'
// times, then falls through; the body thus runs count+1 times. One loop
// level; a LOOP must not sit inside another loop's body. A port B write in
// cycle t stores the p(x) value of cycle t, so a store must come at least two
// instructions after the last one that updated p(x). The program ends with
// the HALT word (all ones); 'done' then rises once the last control bits have
// been applied and stays high until the next 'start'. 'busy' is high while a
// program runs. 'start' is ignored while busy. Reset returns to idle with
// the program counter at 0.
module ctrl_fsm
  import gf3_pkg::*;
#(
  parameter int unsigned PAW = 10,  // program address width
  parameter int unsigned AW  = 7    // RAM address width
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           start,
  output logic           busy,
  output logic           done,
  // instruction memory
  output logic [PAW-1:0] rom_addr,
  input  logic [31:0]    rom_q,
  // RAM ports (FSM side)
  output logic [AW-1:0]  addr_a,
  output logic [AW-1:0]  addr_b,
  output logic           we_b,
  // processing element
  output pe_ctrl_t       pe_ctrl
);
  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DRAIN} state_t;

  state_t         state;
  logic [PAW-1:0] pc;
  logic [5:0]     rep;
  logic [5:0]     loop_cnt;
  logic           is_loop, loop_back;
  instr_t         ir;
  logic           halt, last_rep, issue;
  logic [PAW-1:0] pc_next;

  initial assert (PAW <= 10) else $error("ctrl_fsm: LOOP targets are 10 bits");

  assign ir       = instr_t'(rom_q);
  assign halt     = (rom_q == INSTR_HALT);
  assign is_loop  = (state == S_RUN) && !halt && (ir.ctrl == LOOP_CTRL) && !ir.wen_b;
  assign issue    = (state == S_RUN) && !halt && !is_loop;
  assign last_rep = (rep == ir.count);
  assign loop_back = is_loop && (loop_cnt != ir.count);

  always_comb begin
    pc_next = pc;
    if (loop_back)                 pc_next = PAW'({ir.addr_b[2:0], ir.addr_a});
    else if (is_loop)              pc_next = pc + 1'b1;
    else if (issue && last_rep)    pc_next = pc + 1'b1;
  end
  assign rom_addr = (state == S_IDLE) ? '0 : pc_next;

  assign addr_a = ir.addr_a;
  assign addr_b = ir.addr_b;
  assign we_b   = issue && ir.wen_b;
  assign busy   = (state != S_IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= S_IDLE;
      pc      <= '0;
      rep      <= '0;
      loop_cnt <= '0;
      done     <= 1'b0;
      pe_ctrl  <= '0;
    end else begin
      pe_ctrl <= issue ? ir.ctrl : '0;
      case (state)
        S_IDLE: if (start) begin
          state <= S_RUN;
          pc       <= '0;
          rep      <= '0;
          loop_cnt <= '0;
          done     <= 1'b0;
        end
        S_RUN: begin
          if (halt) state <= S_DRAIN;
          else if (is_loop) begin
            pc       <= pc_next;
            loop_cnt <= loop_back ? loop_cnt + 1'b1 : '0;
          end else begin
            pc  <= pc_next;
            rep <= last_rep ? '0 : rep + 1'b1;
          end
        end
        S_DRAIN: begin          // last control bits are applied this cycle
          state <= S_IDLE;
          done  <= 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
