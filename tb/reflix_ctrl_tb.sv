// reflix_ctrl_tb: self-checking test of the REFLIX control unit alone.
//
// A synchronous-read memory holds a program using every instruction. The
// testbench plays the Signal Input Register (rec is driven directly: signals
// 1 and 8 present, 2 absent, 3 raised later) and the abort block (take is
// injected once, during a decide clock). It checks:
//   * the sequence of executed instruction addresses (jumps, PRESENT and
//     CAWAIT branches, SAWAIT and TAWAIT re-execution, preemption target);
//   * the clocks per instruction cycle: 3 for one-word, 4 for two-word
//     instructions, 1 for a preemption;
//   * the strobes to the other blocks (EMIT, SUSTAIN, ABORT, TSTART) with
//     their operands, and IRBUS.
module reflix_ctrl_tb;
  import reflix_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [15:0] din, addr, irbus, cont_addr, abort_addr, tval;
  logic [19:0] rec;
  logic take, decide, cyc_end, abort_push, emit, sustain, tload;
  logic [4:0] abort_sig;
  logic [3:0] sout_sel;
  logic [1:0] tsel;
  int checks = 0, failures = 0;

  reflix_ctrl dut (.*);

  always #5 clk = ~clk;

  logic [15:0] mem [256];
  always_ff @(posedge clk) din <= mem[addr[7:0]];

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // Expected trace: address of each executed instruction, clocks of its cycle.
  int exp_addr [$];
  int exp_clk  [$];
  task automatic ex(input int at, input int clocks, input int times = 1);
    repeat (times) begin exp_addr.push_back(at); exp_clk.push_back(clocks); end
  endtask

  // Observed trace: on each cycle end, where it was and how long it took.
  int obs_addr [$];
  int obs_clk  [$];
  int clk_in_cycle;
  logic inject;
  int n_exec52, n_exec53;
  logic [15:0] cur_addr;

  assign take = inject && decide;
  assign cont_addr = 16'd60;

  always @(posedge clk) if (rst_n) begin
    if (decide) clk_in_cycle = 1; else clk_in_cycle++;
    if (decide && !take) cur_addr = addr;
    if (cyc_end) begin
      obs_addr.push_back(take ? -1 : int'(cur_addr));
      obs_clk.push_back(clk_in_cycle);
      if (!take) begin
        // Strobes and operands, checked against the program.
        expect_eq(irbus, mem[cur_addr[7:0]], "IRBUS holds the instruction");
        expect_eq(emit,       cur_addr == 1 || cur_addr == 60, "emit strobe");
        expect_eq(sustain,    cur_addr == 2, "sustain strobe");
        expect_eq(abort_push, cur_addr == 10, "abort strobe");
        expect_eq(tload,      cur_addr == 12, "tload strobe");
        if (cur_addr == 1)  expect_eq(sout_sel, 4, "EMIT operand");
        if (cur_addr == 2)  expect_eq(sout_sel, 9, "SUSTAIN operand");
        if (cur_addr == 60) expect_eq(sout_sel, 7, "EMIT operand");
        if (cur_addr == 10) begin
          expect_eq(abort_sig, 6, "ABORT signal");
          expect_eq(abort_addr, 100, "ABORT address");
        end
        if (cur_addr == 12) begin
          expect_eq(tsel, 2, "TSTART timer");
          expect_eq(tval, 777, "TSTART value");
        end
        if (cur_addr == 52) n_exec52++;
        if (cur_addr == 53) n_exec53++;
      end
    end
  end

  int pc_asm;
  task automatic put1(input opcode_e op, input int s1 = 0, input int s2 = 0);
    mem[pc_asm] = enc(op, 5'(s1), 5'(s2)); pc_asm++;
  endtask
  task automatic put2(input opcode_e op, input int s1, input int s2, input int w);
    mem[pc_asm] = enc(op, 5'(s1), 5'(s2)); mem[pc_asm + 1] = 16'(w); pc_asm += 2;
  endtask

  initial begin
    for (int i = 0; i < 256; i++) mem[i] = '0;
    pc_asm = 0;
    put1(OP_NOP);                  //  0
    put1(OP_EMIT, 4);              //  1
    put1(OP_SUSTAIN, 9);           //  2
    put2(OP_JMP, 0, 0, 10);        //  3
    put1(OP_EMIT, 15);             //  5 skipped
    pc_asm = 10;
    put2(OP_ABORT, 6, 0, 100);     // 10
    put2(OP_TSTART, 2, 0, 777);    // 12
    put2(OP_PRESENT, 1, 0, 40);    // 14 present: continue
    put2(OP_PRESENT, 2, 0, 40);    // 16 absent: branch
    pc_asm = 40;
    put2(OP_CAWAIT, 1, 2, 50);     // 40 signal1: continue
    put2(OP_CAWAIT, 2, 8, 50);     // 42 signal2: branch
    pc_asm = 50;
    put2(OP_TAWAIT, 0, 0, 3);      // 50 three cycles
    put1(OP_SAWAIT, 3);            // 52 waits for signal 3
    put2(OP_JMP, 0, 0, 53);        // 53 loop until preempted
    pc_asm = 60;
    put1(OP_EMIT, 7);              // 60
    put2(OP_JMP, 0, 0, 61);        // 61

    ex(0, 3); ex(1, 3); ex(2, 3); ex(3, 4);
    ex(10, 4); ex(12, 4); ex(14, 4); ex(16, 4);
    ex(40, 4); ex(42, 4);
    ex(50, 4, 3);
    ex(52, 3, 6);
    ex(53, 4, 3);
    ex(-1, 1);
    ex(60, 3); ex(61, 4, 2);

    rec = 20'h00102;   // signals 1 and 8
    inject = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // Raise signal 3 after five SAWAIT tries.
    wait (n_exec52 == 5);
    @(negedge clk) rec[3] = 1;
    // Preempt after three passes of the JMP loop.
    wait (n_exec53 == 3);
    @(negedge clk) inject = 1;
    wait (take);
    @(negedge clk) inject = 0;
    expect_eq(addr, 60, "PC loaded with the continuation address");
    wait (obs_addr.size() >= exp_addr.size());
    @(negedge clk);
    for (int i = 0; i < exp_addr.size(); i++) begin
      expect_eq(obs_addr[i], exp_addr[i], $sformatf("executed address #%0d", i));
      expect_eq(obs_clk[i],  exp_clk[i],  $sformatf("clocks of cycle #%0d", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
