// ahb_tb: self-checking test of the Abort Handling Block.
//
// Drives instruction cycles the way the control unit does: a decide clock
// (one clock only, ending the cycle, when a preemption is taken), then two
// more clocks, the last with cyc_end and, for an ABORT, push. Checks
// activation and nesting, preemptive termination (including priority of
// the outermost level and preemption of an inner level only), that events
// of an ABORT's own cycle do not trigger it, non-preemptive termination at
// the continuation address, time-out signals as abort signals and the
// behaviour when a fifth ABORT finds all four levels in use.
module ahb_tb;
  logic clk = 0, rst_n = 0;
  logic [19:0] rec;
  logic cyc_end, decide, push;
  logic [15:0] pc, push_addr, cont_addr;
  logic [4:0] push_sig;
  logic paef, jaf, take, ovf;
  logic [2:0] ap;
  int checks = 0, failures = 0;

  ahb dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
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

  // One instruction cycle. Returns whether it was a preemption and where to.
  task automatic icycle(input logic [15:0] fetch_pc, input logic [19:0] ev,
                        input logic p, input logic [4:0] s, input logic [15:0] a,
                        output logic taken, output logic [15:0] to);
    rec = ev; pc = fetch_pc; decide = 1; cyc_end = 0; push = 0;
    push_sig = s; push_addr = a;
    #1;
    taken = take; to = cont_addr;
    if (take) begin
      cyc_end = 1;
      @(negedge clk);
    end else begin
      @(negedge clk);
      decide = 0;
      @(negedge clk);
      cyc_end = 1; push = p;
      @(negedge clk);
    end
    decide = 0; cyc_end = 0; push = 0; rec = '0;
  endtask

  task automatic abort_(input logic [4:0] s, input logic [15:0] a, input logic [19:0] ev = '0);
    logic t; logic [15:0] to;
    icycle(16'h0200, ev, 1, s, a, t, to);
    expect_eq(t, 0, "no preemption while activating");
  endtask

  task automatic plain(input logic [19:0] ev, output logic t, output logic [15:0] to,
                       input logic [15:0] fetch_pc = 16'h0300);
    icycle(fetch_pc, ev, 0, 0, 0, t, to);
  endtask

  initial begin
    logic t; logic [15:0] to;
    rec = 0; cyc_end = 0; decide = 0; push = 0; pc = 0; push_addr = 0; push_sig = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    expect_eq(ap, 0, "ap after reset");
    expect_eq(jaf, 0, "jaf after reset");

    // Two nested levels: outer on signal 4 -> 100, inner on signal 2 -> 50.
    abort_(4, 100);
    abort_(2, 50);
    expect_eq(ap, 2, "two levels active");
    expect_eq(jaf, 1, "jaf with levels active");
    plain(20'h00001, t, to);          // unrelated signal
    expect_eq(paef, 0, "unwatched signal leaves PAEF clear");
    plain(20'h00004, t, to);          // signal 2 during this cycle
    expect_eq(t, 0, "no preemption in the cycle of the event");
    expect_eq(paef, 1, "PAEF set after the cycle with the event");
    plain(0, t, to);
    expect_eq(t, 1, "inner preemption taken");
    expect_eq(to, 50, "inner continuation address");
    expect_eq(ap, 1, "outer level remains");
    expect_eq(paef, 0, "PAEF cleared by preemption");

    // Both signals in one cycle: the outer level wins and both end.
    abort_(2, 50);
    plain(20'h00014, t, to);
    plain(0, t, to);
    expect_eq(t, 1, "priority preemption taken");
    expect_eq(to, 100, "outer continuation address wins");
    expect_eq(ap, 0, "all levels ended");
    expect_eq(jaf, 0, "jaf clear");

    // An event in the ABORT's own cycle does not trigger it.
    abort_(5, 70, 20'h00020);
    expect_eq(paef, 0, "own-cycle event ignored");
    plain(0, t, to);
    expect_eq(t, 0, "no preemption from own-cycle event");
    // ... but an event in the next cycle does.
    plain(20'h00020, t, to);
    plain(0, t, to);
    expect_eq(t, 1, "preemption from next-cycle event");
    expect_eq(to, 70, "continuation 70");

    // Non-preemptive termination: levels (5 -> 30) and (6 -> 20).
    abort_(5, 30);
    abort_(6, 20);
    plain(0, t, to, 16'd20);
    expect_eq(ap, 1, "inner level ended at its continuation address");
    plain(0, t, to, 16'd25);
    expect_eq(ap, 1, "outer level still active");
    plain(0, t, to, 16'd30);
    expect_eq(ap, 0, "outer level ended at its continuation address");
    expect_eq(t, 0, "no jump for non-preemptive termination");

    // Reaching an outer continuation ends the inner levels as well.
    abort_(5, 40);
    abort_(6, 45);
    plain(0, t, to, 16'd40);
    expect_eq(ap, 0, "outer continuation ends inner level too");

    // A time-out (signal 17 = TimeOut[1]) as abort signal.
    abort_(17, 90);
    plain(20'h20000, t, to);
    plain(0, t, to);
    expect_eq(t, 1, "time-out preemption");
    expect_eq(to, 90, "time-out continuation");

    // Four levels, then a fifth: ignored, ovf set.
    abort_(8, 11);
    abort_(9, 12);
    abort_(10, 13);
    abort_(11, 14);
    expect_eq(ap, 4, "four levels");
    expect_eq(ovf, 0, "no overflow yet");
    abort_(12, 15);
    expect_eq(ap, 4, "fifth ABORT ignored");
    expect_eq(ovf, 1, "overflow flagged");
    plain(20'h01000, t, to);          // signal 12 is not watched
    expect_eq(paef, 0, "ignored level does not watch");
    // Preempt level 2 only: levels 0 and 1 stay.
    plain(20'h00400, t, to);
    plain(0, t, to);
    expect_eq(t, 1, "level 2 preemption");
    expect_eq(to, 13, "level 2 continuation");
    expect_eq(ap, 2, "levels 0 and 1 remain");
    // Signal of the ended level 3 no longer triggers.
    plain(20'h00800, t, to);
    expect_eq(paef, 0, "ended level no longer watched");
    // Level 0 still watches.
    plain(20'h00100, t, to);
    plain(0, t, to);
    expect_eq(to, 11, "level 0 continuation");
    expect_eq(ap, 0, "stack empty");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
