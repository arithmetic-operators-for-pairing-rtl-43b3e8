// tb_ctrl_fsm -- runs the control FSM on a short program held in a
// behavioural synchronous ROM and checks, cycle by cycle, what it issues:
// RAM addresses and port B write enable in the issue cycle, the operator's
// control bits one cycle later, count+1 repetitions of each instruction,
// a LOOP instruction that runs instructions 1..3 twice (one idle cycle per
// LOOP), 'done' after the HALT word, and a second run after a new 'start'.
module tb_ctrl_fsm;
  import gf3_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst, start, busy, done, we_b;
  logic [9:0] rom_addr;
  logic [31:0] rom_q;
  logic [6:0] addr_a, addr_b;
  pe_ctrl_t pe_ctrl;

  logic [31:0] rom [1024];
  always_ff @(posedge clk) rom_q <= rom[rom_addr];

  ctrl_fsm dut (.clk, .rst, .start, .busy, .done, .rom_addr, .rom_q,
                .addr_a, .addr_b, .we_b, .pe_ctrl);

  function automatic logic [31:0] mk(int cnt, bit wen, int ab, int aa, int c);
    return {6'(cnt), wen, 7'(ab), 7'(aa), 11'(c)};
  endfunction

  // expected issue trace
  int exp_aa [$], exp_ab [$], exp_we [$], exp_c [$];
  localparam int NPROG = 4;
  int p_cnt [NPROG] = '{0, 3, 0, 1};
  int p_we  [NPROG] = '{0, 0, 1, 0};
  int p_ab  [NPROG] = '{5, 9, 17, 100};
  int p_aa  [NPROG] = '{1, 2, 3, 127};
  int p_c   [NPROG] = '{11'h02B, 11'h7F0, 11'h000, 11'h555};

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_once();
    int n = 0, cyc = 0, n_loops = 0;
    pe_ctrl_t prev_c;
    logic prev_issue;
    start = 1;
    @(posedge clk); #1;
    start = 0;
    prev_issue = 0;
    prev_c = '0;
    while (!done && cyc < 100) begin
      // control bits lag the issue by one cycle
      checks++;
      if (pe_ctrl !== (prev_issue ? prev_c : pe_ctrl_t'(0))) begin
        failures++; $display("FAIL ctrl lag at cycle %0d", cyc);
      end
      prev_issue = 0;
      if (busy && rom_q[10:0] == LOOP_CTRL && !rom_q[25]) begin
        n_loops++;
        checks++;
        if (we_b) begin failures++; $display("FAIL write during LOOP"); end
      end else if (n < exp_aa.size() && busy && rom_q != INSTR_HALT) begin
        checks++;
        if (addr_a !== 7'(exp_aa[n]) || addr_b !== 7'(exp_ab[n]) || we_b !== 1'(exp_we[n])) begin
          failures++;
          $display("FAIL issue %0d: aa=%0d ab=%0d we=%0d", n, addr_a, addr_b, we_b);
        end
        prev_c = pe_ctrl_t'(exp_c[n]);
        prev_issue = 1;
        n++;
      end else if (busy) begin
        checks++;
        if (we_b) begin failures++; $display("FAIL write after halt"); end
      end
      @(posedge clk); #1;
      cyc++;
    end
    checks++;
    if (n != exp_aa.size() || !done) begin
      failures++;
      $display("FAIL issued %0d of %0d, done=%0d", n, exp_aa.size(), done);
    end
    checks++;
    if (cyc != exp_aa.size() + 2 + 2 || n_loops != 2) begin
      failures++;
      $display("FAIL run took %0d cycles with %0d LOOP cycles, expected %0d and 2",
               cyc, n_loops, exp_aa.size() + 4);
    end
  endtask

  initial begin
    for (int i = 0; i < 1024; i++) rom[i] = INSTR_HALT;
    for (int i = 0; i < NPROG; i++) rom[i] = mk(p_cnt[i], p_we[i] != 0, p_ab[i], p_aa[i], p_c[i]);
    rom[NPROG] = mk(1, 0, 0, 1, 11'h7FF);     // LOOP to address 1, one extra pass
    for (int pass = 0; pass < 2; pass++)
      for (int i = (pass == 0) ? 0 : 1; i < NPROG; i++)
        for (int r = 0; r <= p_cnt[i]; r++) begin
          exp_aa.push_back(p_aa[i]); exp_ab.push_back(p_ab[i]);
          exp_we.push_back(p_we[i]); exp_c.push_back(p_c[i]);
        end
    rst = 1; start = 0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    @(posedge clk); #1;
    checks++;
    if (busy || done || pe_ctrl != '0) begin failures++; $display("FAIL idle state"); end
    run_once();
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (!done || busy) begin failures++; $display("FAIL done not held"); end
    run_once();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
