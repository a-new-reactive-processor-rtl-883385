// pump_single_tb: the single-level mine pump controller on the REFLIX
// processor.
//
// The program is the basic pump controller: the pumping loop (wait for high
// water, start the pump, wait for low water, stop the pump) runs inside one
// ABORT on NOT-RIGHT-METHANE; the continuation stops the pump and waits for
// RIGHT-METHANE before starting over. It is nine instructions.
//
// The environment cycles the water level several times, raises
// NOT-RIGHT-METHANE while the loop waits for high water and, on another
// round, while it waits for low water (pump running), and checks:
//   * the program is nine instructions long;
//   * START-PUMP / STOP-PUMP pulses follow the water levels;
//   * after NOT-RIGHT-METHANE the pump is stopped within 3 instruction
//     cycles of the event's cycle (event cycle, preemption, EMIT) and stays
//     off while methane is wrong, even when the water is high;
//   * after RIGHT-METHANE pumping works again.
module pump_single_tb;
  import reflix_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [15:0] din, a, irbus, sout, sin;
  logic [3:0]  timeout;
  logic paef, jaf, abort_ovf;
  int checks = 0, failures = 0;

  reflix dut (.*);

  always #5 clk = ~clk;

  logic [15:0] mem [64];
  always_ff @(posedge clk) din <= mem[a[5:0]];

  initial begin
    #1000000;
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

  localparam int HWL = 0, LWL = 1, NRM = 2, RM = 3;    // Sin
  localparam int START = 0, STOP = 1;                  // Sout

  int rises [2];
  logic [1:0] sout_d;
  int icycles;
  always @(posedge clk) begin
    if (rst_n && dut.cyc_end) icycles++;
    for (int i = 0; i < 2; i++) if (sout[i] && !sout_d[i]) rises[i]++;
    sout_d <= sout[1:0];
  end

  int pc_asm, n_instr;
  task automatic put(input opcode_e op, input int s = 0, input int w = -1);
    mem[pc_asm] = enc(op, 5'(s), 5'(0));
    pc_asm++;
    if (two_words(op)) begin
      mem[pc_asm] = 16'(w);
      pc_asm++;
    end
    n_instr++;
  endtask

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

  // One round of water: high, then low. Checks one START and one STOP.
  task automatic water_round(input string what);
    int s0, p0;
    s0 = rises[START]; p0 = rises[STOP];
    sin[HWL] = 1; wait_at(3, 300, what); sin[HWL] = 0;
    repeat (10) @(negedge clk);
    sin[LWL] = 1; wait_at(5, 300, what); sin[LWL] = 0;
    repeat (10) @(negedge clk);
    expect_eq(rises[START] - s0, 1, {what, ": START-PUMP"});
    expect_eq(rises[STOP] - p0, 1, {what, ": STOP-PUMP"});
  endtask

  // Methane goes wrong; the pump must stop promptly and stay stopped.
  task automatic methane_event(input string what);
    int c0, s0;
    s0 = rises[START];
    sin[NRM] = 1;
    c0 = icycles;
    wait (sout[STOP]);
    sin[NRM] = 0;
    checks++;
    if (icycles - c0 > 4) begin
      failures++;
      $display("FAIL %s: pump stopped %0d instruction cycles after the event", what, icycles - c0);
    end
    // Water high while methane is wrong: no pumping.
    sin[HWL] = 1;
    repeat (60) @(negedge clk);
    sin[HWL] = 0;
    expect_eq(rises[START] - s0, 0, {what, ": no START while methane wrong"});
    expect_eq(int'(dut.u_ahb.ap_q), 0, {what, ": abort level ended"});
    sin[RM] = 1; wait_at(0, 300, {what, ": restart"}); sin[RM] = 0;
    wait_at(2, 300, {what, ": loop"});
    expect_eq(int'(dut.u_ahb.ap_q), 1, {what, ": abort level active again"});
  endtask

  initial begin
    sin = '0;
    for (int i = 0; i < 64; i++) mem[i] = '0;
    pc_asm = 0; n_instr = 0;
    put(OP_ABORT, NRM, 8);     //  0 start: ABORT NOT-RIGHT-METHANE, l1
    put(OP_SAWAIT, HWL);       //  2 loop:  SAWAIT HIGH-WATER-LEVEL
    put(OP_EMIT, START);       //  3        EMIT START-PUMP
    put(OP_SAWAIT, LWL);       //  4        SAWAIT LOW-WATER-LEVEL
    put(OP_EMIT, STOP);        //  5        EMIT STOP-PUMP
    put(OP_JMP, 0, 2);         //  6        JMP loop
    put(OP_EMIT, STOP);        //  8 l1:    EMIT STOP-PUMP
    put(OP_SAWAIT, RM);        //  9        SAWAIT RIGHT-METHANE
    put(OP_JMP, 0, 0);         // 10        JMP start
    expect_eq(n_instr, 9, "program length in instructions");
    expect_eq(pc_asm, 12, "program length in words");

    repeat (3) @(negedge clk);
    rst_n = 1;
    wait_at(2, 100, "enter loop");
    water_round("round 1");
    repeat (15) @(negedge clk);
    methane_event("event while waiting for high water");
    water_round("round 2");
    // Methane goes wrong while the pump is running.
    sin[HWL] = 1; wait_at(3, 300, "start before event"); sin[HWL] = 0;
    repeat (12) @(negedge clk);
    expect_eq(int'(dut.u_ctrl.ipc_q), 4, "waiting for low water");
    methane_event("event while pumping");
    water_round("round 3");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
