// sor_tb: self-checking test of the Signal Output Register.
//
// Instruction cycles are 3 clocks long here (cyc_end on every third clock).
// Checks that an EMIT raises its line for exactly one instruction cycle
// (3 clocks), that two EMITs in a row keep the line high, that SUSTAIN
// keeps a line high for ever, and that emitted and sustained lines combine.
module sor_tb;
  logic clk = 0, rst_n = 0;
  logic cyc_end, emit, sustain;
  logic [3:0] sel;
  logic [15:0] sout;
  int checks = 0, failures = 0;
  int phase = 0;

  sor dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One instruction cycle of 3 clocks; the request sits on the last clock.
  task automatic icycle(input logic e, input logic s, input logic [3:0] n);
    emit = 0; sustain = 0; cyc_end = 0; sel = n;
    @(negedge clk);
    @(negedge clk);
    emit = e; sustain = s; cyc_end = 1;
    @(negedge clk);
    emit = 0; sustain = 0; cyc_end = 0;
  endtask

  task automatic expect_for(input int clocks, input logic [15:0] exp, input string what);
    for (int i = 0; i < clocks; i++) begin
      checks++;
      if (sout !== exp) begin
        failures++;
        $display("FAIL %s clock %0d: sout=%h expected=%h", what, i, sout, exp);
      end
      if (i + 1 < clocks) @(negedge clk);
    end
  endtask

  // Count the clocks a line is high.
  int high_clocks [16];
  always @(posedge clk) for (int i = 0; i < 16; i++) if (sout[i]) high_clocks[i]++;

  initial begin
    cyc_end = 0; emit = 0; sustain = 0; sel = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    checks++; if (sout !== '0) begin failures++; $display("FAIL reset"); end
    // EMIT line 4: high during the next instruction cycle only.
    icycle(1, 0, 4);
    fork
      expect_for(3, 16'h0010, "emit 4");
      icycle(0, 0, 0);
    join
    @(negedge clk);
    checks++; if (sout !== '0) begin failures++; $display("FAIL emit 4 not cleared"); end
    // Two EMITs of line 7 back to back: high for two cycles.
    icycle(1, 0, 7);
    icycle(1, 0, 7);
    icycle(0, 0, 0);
    @(negedge clk);
    checks++; if (high_clocks[7] != 6) begin failures++; $display("FAIL line 7 high %0d clocks", high_clocks[7]); end
    // SUSTAIN line 15 and EMIT line 0.
    icycle(0, 1, 15);
    icycle(1, 0, 0);
    expect_for(3, 16'h8001, "sustain + emit");
    repeat (20) icycle(0, 0, 3);
    expect_for(5, 16'h8000, "sustained for ever");
    checks++; if (high_clocks[4] != 3) begin failures++; $display("FAIL line 4 high %0d clocks", high_clocks[4]); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
