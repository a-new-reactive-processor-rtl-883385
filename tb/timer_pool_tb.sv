// timer_pool_tb: self-checking test of the timer pool.
//
// Instruction cycles are 4 clocks long (tick on every fourth clock). For
// every timer and several delays d, loads the timer and checks that its
// time-out rises after exactly d further ticks, stays high for exactly one
// instruction cycle (4 clocks) and that the other time-outs stay low.
// Also checks that loading 0 stops a running timer and that two timers run
// independently.
module timer_pool_tb;
  logic clk = 0, rst_n = 0;
  logic tick, load;
  logic [1:0] sel;
  logic [15:0] value;
  logic [3:0] timeout;
  int checks = 0, failures = 0;

  timer_pool dut (.*);

  always #5 clk = ~clk;

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One instruction cycle; optional load on its tick. Returns the time-out
  // lines seen on each of its clocks ORed, and whether they were steady.
  task automatic icycle(input logic ld, input logic [1:0] t, input logic [15:0] v,
                        output logic [3:0] seen, output logic steady);
    logic [3:0] first;
    load = 0; tick = 0; sel = t; value = v;
    first = timeout; seen = timeout; steady = 1;
    for (int c = 0; c < 4; c++) begin
      if (c == 3) begin tick = 1; load = ld; end
      seen |= timeout;
      if (timeout !== first) steady = 0;
      @(negedge clk);
    end
    tick = 0; load = 0;
  endtask

  task automatic run_one(input logic [1:0] t, input int d);
    logic [3:0] seen; logic steady; int when;
    icycle(1, t, 16'(d), seen, steady);
    when = -1;
    for (int k = 1; k <= d + 3; k++) begin
      icycle(0, 0, 0, seen, steady);
      if (seen != 0) begin
        checks++;
        if (!(seen == (4'b1 << t) && steady)) begin
          failures++;
          $display("FAIL timer %0d d=%0d: timeout=%b steady=%0d", t, d, seen, steady);
        end
        if (when < 0) when = k;
        else begin
          failures++;
          $display("FAIL timer %0d d=%0d: time-out lasted more than one cycle", t, d);
        end
      end
    end
    checks++;
    if (when != d + 1) begin
      failures++;
      $display("FAIL timer %0d d=%0d: time-out in cycle %0d, expected %0d", t, d, when, d + 1);
    end
  endtask

  initial begin
    logic [3:0] seen; logic steady;
    tick = 0; load = 0; sel = 0; value = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 4; t++) begin
      run_one(2'(t), 1);
      run_one(2'(t), 2);
      run_one(2'(t), 5);
      run_one(2'(t), 1 + int'($urandom_range(0, 30)));
    end
    // Load 0 stops a running timer.
    icycle(1, 2, 16'd3, seen, steady);
    icycle(1, 2, 16'd0, seen, steady);
    for (int k = 0; k < 6; k++) begin
      icycle(0, 0, 0, seen, steady);
      checks++;
      if (seen != 0) begin failures++; $display("FAIL stopped timer fired"); end
    end
    // Two timers at once: timer 0 with 2, timer 3 with 4 (loaded one cycle later).
    begin
      logic [3:0] hist [8];
      icycle(1, 0, 16'd2, seen, steady);
      icycle(1, 3, 16'd4, hist[0], steady);
      for (int k = 1; k < 8; k++) icycle(0, 0, 0, hist[k], steady);
      for (int k = 0; k < 8; k++) begin
        logic [3:0] exp;
        exp = 0;
        if (k == 2) exp[0] = 1;
        if (k == 5) exp[3] = 1;
        checks++;
        if (hist[k] != exp) begin
          failures++;
          $display("FAIL two timers cycle %0d: %b expected %b", k, hist[k], exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
