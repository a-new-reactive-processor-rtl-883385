// sir_tb: self-checking test of the Signal Input Register.
//
// Drives random signal patterns and random instruction-cycle ends and
// compares the record with a model: a signal is in the record if its input
// was high one clock earlier, or at any clock since the last cycle end.
// Also checks a hand-made sequence: a one-clock pulse stays recorded until
// the cycle ends, and is gone in the next cycle.
module sir_tb;
  localparam int unsigned NSIG = 20;
  logic clk = 0, rst_n = 0;
  logic [NSIG-1:0] sig_in, rec;
  logic cyc_end;
  int checks = 0, failures = 0;

  sir #(.NSIG(NSIG)) dut (.*);

  always #5 clk = ~clk;

  // Model state, updated on the same edges.
  logic [NSIG-1:0] m_sample, m_seen;

  task automatic check(input logic [NSIG-1:0] exp, input string what);
    checks++;
    if (rec !== exp) begin
      failures++;
      $display("FAIL %s: rec=%h expected=%h", what, rec, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sig_in = '0; cyc_end = 0; m_sample = '0; m_seen = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // Directed: pulse bit 3 for one clock, in the middle of a cycle.
    @(negedge clk) sig_in = 20'h8;
    @(negedge clk) sig_in = '0;          // sampled now
    check(20'h8, "pulse sampled");
    @(negedge clk) check(20'h8, "pulse held in record");
    cyc_end = 1;
    @(negedge clk) cyc_end = 0;
    check(20'h0, "record cleared after cycle end");
    // Random: model runs alongside.
    m_sample = '0; m_seen = '0;
    for (int i = 0; i < 2000; i++) begin
      sig_in  = 20'($urandom() & $urandom() & $urandom());   // sparse events
      cyc_end = ($urandom_range(0, 3) == 0);
      @(posedge clk);
      m_seen   = cyc_end ? '0 : (m_seen | m_sample);
      m_sample = sig_in;
      @(negedge clk);
      check(m_seen | m_sample, "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
