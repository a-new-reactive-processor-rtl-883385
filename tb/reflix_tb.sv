// reflix_tb: end-to-end test of the REFLIX processor at its default sizes.
//
// A synchronous-read program memory (data one clock after the address) is
// attached to the processor. Two programs are run, each after a reset:
//
// 1. The mine pump controller with two priority levels: the pump loop runs
//    inside ABORT NOT-RIGHT-METHANE, which runs inside ABORT HIGH-METHANE.
//    The environment raises the water levels, then NOT-RIGHT-METHANE (inner
//    preemption, pump stopped), then RIGHT-METHANE (back to normal), then
//    HIGH-METHANE together with NOT-RIGHT-METHANE (outer level must win:
//    ALARM raised). Checks START-PUMP / STOP-PUMP / ALARM pulses and where
//    the program resumes.
// 2. A program touching every remaining mechanism: SUSTAIN, a timer started
//    by TSTART preempting a SAWAIT through ABORT on its time-out (with the
//    cycle count checked), non-preemptive ABORT termination, TAWAIT (length
//    checked), PRESENT taken and not taken, CAWAIT on either signal and
//    while waiting, and a fifth nested ABORT (overflow).
//
// Every mechanism is counted; one that never happened counts as a failure.
module reflix_tb;
  import reflix_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [15:0] din, a, irbus, sout, sin;
  logic [3:0]  timeout;
  logic paef, jaf, abort_ovf;
  int checks = 0, failures = 0;

  reflix dut (.*);

  always #5 clk = ~clk;

  logic [15:0] mem [256];
  always_ff @(posedge clk) din <= mem[a[7:0]];

  initial begin
    #2000000;
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

  // ---------------------------------------------------------------- coverage
  int n_take, n_take_outer, n_emit, n_sustain, n_stay_sawait, n_tawait_exec,
      n_cawait_wait, n_cawait_a, n_cawait_b, n_present_yes, n_present_no,
      n_np_term, n_timeout_abort, n_tstart, n_push, n_jmp, n_ovf;
  int icycles;

  always @(posedge clk) if (rst_n) begin
    if (dut.cyc_end) icycles++;
    if (dut.take) begin
      n_take++;
      if (int'(dut.u_ahb.axp_q) + 1 < int'(dut.u_ahb.ap_q)) n_take_outer++;
      if (|(dut.u_ahb.aasr_q[dut.u_ahb.axp_q][19:16])) n_timeout_abort++;
    end
    if (dut.decide && !dut.take && dut.jaf && dut.u_ahb.np_hit) n_np_term++;
    if (dut.u_ctrl.state_q == dut.u_ctrl.S_EXEC) begin
      case (dut.u_ctrl.ir_q.op)
        OP_EMIT:    n_emit++;
        OP_SUSTAIN: n_sustain++;
        OP_SAWAIT:  if (dut.u_ctrl.stay) n_stay_sawait++;
        OP_TAWAIT:  n_tawait_exec++;
        OP_CAWAIT:  if (dut.u_ctrl.stay) n_cawait_wait++;
                    else if (dut.u_ctrl.branch) n_cawait_b++;
                    else n_cawait_a++;
        OP_PRESENT: if (dut.u_ctrl.branch) n_present_no++; else n_present_yes++;
        OP_TSTART:  n_tstart++;
        OP_ABORT:   n_push++;
        OP_JMP:     n_jmp++;
        default: ;
      endcase
    end
  end

  // Count rising edges of each output line.
  int rises [16];
  logic [15:0] sout_d;
  always @(posedge clk) begin
    for (int i = 0; i < 16; i++) if (sout[i] && !sout_d[i]) rises[i]++;
    sout_d <= sout;
  end

  // ------------------------------------------------------------- assembler
  int pc_asm;
  task automatic put1(input opcode_e op, input int s1 = 0, input int s2 = 0);
    mem[pc_asm] = enc(op, 5'(s1), 5'(s2));
    pc_asm++;
  endtask
  task automatic put2(input opcode_e op, input int s1, input int s2, input int w);
    mem[pc_asm] = enc(op, 5'(s1), 5'(s2));
    mem[pc_asm + 1] = 16'(w);
    pc_asm += 2;
  endtask

  task automatic do_reset();
    rst_n = 0; sin = '0;
    repeat (3) @(negedge clk);
    for (int i = 0; i < 16; i++) rises[i] = 0;
    rst_n = 1;
  endtask

  task automatic wait_cycles(input int n);
    repeat (n) @(negedge clk);
  endtask

  // Wait (at most limit clocks) until the PC of the instruction being
  // executed is at.
  task automatic wait_at(input int at, input int limit, input string what);
    int k;
    for (k = 0; k < limit; k++) begin
      @(negedge clk);
      if (dut.u_ctrl.state_q == dut.u_ctrl.S_EXEC && int'(dut.u_ctrl.ipc_q) == at) break;
    end
    checks++;
    if (k == limit) begin
      failures++;
      $display("FAIL %s: never executed address %0d", what, at);
    end
  endtask

  // Sensor / output numbering of the pump controller.
  localparam int HWL = 0, LWL = 1, NRM = 2, RM = 3, HM = 4;    // Sin
  localparam int START = 0, STOP = 1, ALARM = 2;               // Sout

  initial begin
    int t0, t1;
    sin = '0;
    for (int i = 0; i < 256; i++) mem[i] = '0;

    // ------------------------------------------------ program 1: pump
    pc_asm = 0;
    put2(OP_ABORT, HM, 0, 14);       //  0 start:  ABORT HIGH-METHANE, addr1
    put2(OP_ABORT, NRM, 0, 10);      //  2 start1: ABORT NOT-RIGHT-METHANE, addr
    put1(OP_SAWAIT, HWL);            //  4 loop:   SAWAIT HIGH-WATER-LEVEL
    put1(OP_EMIT, START);            //  5         EMIT START-PUMP
    put1(OP_SAWAIT, LWL);            //  6         SAWAIT LOW-WATER-LEVEL
    put1(OP_EMIT, STOP);             //  7         EMIT STOP-PUMP
    put2(OP_JMP, 0, 0, 4);           //  8         JMP loop
    put1(OP_EMIT, STOP);             // 10 addr:   EMIT STOP-PUMP
    put1(OP_SAWAIT, RM);             // 11         SAWAIT RIGHT-METHANE
    put2(OP_JMP, 0, 0, 2);           // 12         JMP start1
    put1(OP_EMIT, STOP);             // 14 addr1:  EMIT STOP-PUMP
    put1(OP_EMIT, ALARM);            // 15         EMIT ALARM
    put1(OP_SAWAIT, RM);             // 16         SAWAIT RIGHT-METHANE
    put2(OP_JMP, 0, 0, 0);           // 17         JMP start

    do_reset();
    wait_cycles(60);
    expect_eq(int'(dut.u_ahb.ap_q), 2, "pump: two abort levels active");
    expect_eq(rises[START], 0, "pump: idle while water low");
    sin[HWL] = 1; wait_at(5, 200, "pump start"); sin[HWL] = 0;
    wait_cycles(8);
    expect_eq(rises[START], 1, "pump: START-PUMP emitted");
    sin[LWL] = 1; wait_at(7, 200, "pump stop"); sin[LWL] = 0;
    wait_cycles(8);
    expect_eq(rises[STOP], 1, "pump: STOP-PUMP emitted");
    // Methane not right: inner preemption to addr (10).
    wait_cycles(20);
    sin[NRM] = 1;
    t0 = icycles;
    wait_at(10, 200, "inner preemption");
    t1 = icycles;
    sin[NRM] = 0;
    // The event is recorded in one cycle and taken in the next: at most the
    // current cycle, the preemption cycle and the cycle of the event.
    checks++;
    if (t1 - t0 > 3) begin failures++; $display("FAIL inner preemption took %0d cycles", t1 - t0); end
    wait_cycles(8);
    expect_eq(rises[STOP], 2, "pump: STOP-PUMP after NOT-RIGHT-METHANE");
    expect_eq(int'(dut.u_ahb.ap_q), 1, "pump: outer level still active");
    wait_cycles(30);
    expect_eq(rises[START], 1, "pump: no pumping while methane not right");
    sin[RM] = 1; wait_at(12, 200, "resume"); sin[RM] = 0;
    wait_at(4, 200, "back in loop");
    expect_eq(int'(dut.u_ahb.ap_q), 2, "pump: inner level re-activated");
    // High methane and not-right methane together: outer wins.
    wait_cycles(20);
    sin[HM] = 1; sin[NRM] = 1;
    wait_at(15, 200, "alarm");
    sin[HM] = 0; sin[NRM] = 0;
    wait_cycles(8);
    expect_eq(rises[ALARM], 1, "pump: ALARM emitted");
    expect_eq(int'(dut.u_ahb.ap_q), 0, "pump: both levels ended");
    checks++;
    if (n_take_outer == 0) begin failures++; $display("FAIL outer level did not win"); end
    sin[RM] = 1; wait_at(0, 200, "restart"); sin[RM] = 0;
    wait_at(4, 200, "loop after restart");
    expect_eq(int'(dut.u_ahb.ap_q), 2, "pump: restarted with two levels");

    // ------------------------------------------- program 2: mechanisms
    for (int i = 0; i < 256; i++) mem[i] = '0;
    pc_asm = 0;
    put1(OP_SUSTAIN, 5);             //  0 SUSTAIN 5
    put2(OP_TSTART, 0, 0, 5);        //  1 TSTART 0, 5
    put2(OP_ABORT, 16, 0, 9);        //  3 ABORT TimeOut0, 9
    put1(OP_SAWAIT, 15);             //  5 SAWAIT 15 (never raised)
    put1(OP_EMIT, 14);               //  6 (skipped by the preemption)
    put2(OP_JMP, 0, 0, 6);           //  7
    put1(OP_EMIT, 6);                //  9 EMIT 6
    put2(OP_ABORT, 15, 0, 13);       // 10 ABORT 15, 13
    put1(OP_NOP);                    // 12 body ends: non-preemptive termination
    put2(OP_TAWAIT, 0, 0, 4);        // 13 TAWAIT 4
    put2(OP_PRESENT, 7, 0, 19);      // 15 PRESENT 7, 19 (7 low: branch)
    put1(OP_EMIT, 13);               // 17 (skipped)
    put1(OP_NOP);                    // 18
    put2(OP_CAWAIT, 10, 9, 25);      // 19 CAWAIT 10, 9, 25 (9 high: branch)
    put1(OP_EMIT, 13);               // 21 (skipped)
    pc_asm = 25;
    put2(OP_CAWAIT, 8, 11, 40);      // 25 CAWAIT 8, 11, 40 (8 high: continue)
    put2(OP_PRESENT, 8, 0, 40);       // 27 PRESENT 8, 40 (8 high: continue)
    put2(OP_CAWAIT, 12, 11, 40);     // 29 CAWAIT 12, 11, 40 (waits for 12)
    put2(OP_ABORT, 15, 0, 50);       // 31 five nested ABORTs
    put2(OP_ABORT, 15, 0, 50);       // 33
    put2(OP_ABORT, 15, 0, 50);       // 35
    put2(OP_ABORT, 15, 0, 50);       // 37
    put2(OP_ABORT, 15, 0, 50);       // 39 (overflow: ignored)
    put1(OP_NOP);                    // 41
    pc_asm = 50;
    put1(OP_EMIT, 9);                // 50 all levels end here
    put2(OP_JMP, 0, 0, 51);          // 51 stay

    do_reset();
    sin[8] = 1; sin[9] = 1;
    wait_at(1, 100, "TSTART");
    t0 = icycles;
    wait_at(9, 400, "time-out preemption");
    t1 = icycles;
    // TSTART cycle ends (t0+1), 5 cycles complete, time-out during the 6th,
    // preemption in the 7th; EXEC at 9 is the 8th cycle after TSTART's.
    expect_eq(t1 - t0, 8, "time-out preemption cycle count");
    expect_eq(rises[14], 0, "preempted body did not continue");
    wait_at(13, 100, "TAWAIT");
    t0 = icycles;
    wait_at(15, 100, "after TAWAIT");
    t1 = icycles;
    expect_eq(t1 - t0, 4, "TAWAIT 4 lasts 4 instruction cycles");
    wait_at(29, 200, "CAWAIT waiting");
    wait_cycles(40);
    sin[12] = 1;
    wait_at(50, 400, "nested end");
    wait_cycles(10);
    expect_eq(int'(dut.u_ahb.ap_q), 0, "all nested levels ended at the continuation");
    expect_eq(int'(abort_ovf), 1, "fifth ABORT flagged");
    expect_eq(int'(sout[5]), 1, "SUSTAIN line still high");
    expect_eq(rises[5], 1, "SUSTAIN line rose once");
    expect_eq(rises[6], 1, "EMIT 6 seen");
    expect_eq(rises[9], 1, "EMIT 9 seen");
    expect_eq(rises[13], 0, "skipped EMITs not executed");
    n_ovf = int'(abort_ovf);
    expect_eq(n_tawait_exec, 4, "TAWAIT executions");

    // --------------------------------------------------- coverage summary
    begin
      int cov [string];
      cov["preemptive termination"]     = n_take;
      cov["priority: outer level wins"] = n_take_outer;
      cov["time-out abort"]             = n_timeout_abort;
      cov["non-preemptive termination"] = n_np_term;
      cov["ABORT activation"]           = n_push;
      cov["nesting overflow"]           = n_ovf;
      cov["EMIT"]                       = n_emit;
      cov["SUSTAIN"]                    = n_sustain;
      cov["SAWAIT busy wait"]           = n_stay_sawait;
      cov["TAWAIT"]                     = n_tawait_exec;
      cov["TSTART"]                     = n_tstart;
      cov["CAWAIT wait"]                = n_cawait_wait;
      cov["CAWAIT signal1"]             = n_cawait_a;
      cov["CAWAIT signal2 branch"]      = n_cawait_b;
      cov["PRESENT present"]            = n_present_yes;
      cov["PRESENT absent branch"]      = n_present_no;
      cov["JMP"]                        = n_jmp;
      foreach (cov[k]) begin
        $display("  %-28s %0d", k, cov[k]);
        checks++;
        if (cov[k] == 0) begin failures++; $display("FAIL mechanism never happened: %s", k); end
      end
    end
    $display("instruction cycles: %0d", icycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
