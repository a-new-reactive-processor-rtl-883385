// reflix: the REFLIX reactive processor.
//
// A 16-bit processor whose instruction set reacts to external signals
// directly: EMIT / SUSTAIN drive output lines, SAWAIT / CAWAIT / PRESENT poll
// input lines, TAWAIT waits for a number of instruction cycles, and ABORT
// starts a preemptable region: while the region runs, the appearance of the
// watched signal makes the processor jump to the region's continuation
// address at the next instruction boundary, without saving any context.
// Nested ABORTs (up to four) give priorities: the outermost watched signal
// wins.
//
// Blocks: reflix_ctrl (control unit, PC, instruction registers), ahb (abort
// handling block), sir (records the input signals of each instruction
// cycle), sor (output lines) and timer_pool (four time-out timers whose
// outputs are also watched signals 16..19).
//
// Pins: clk, rst_n (active low), din/a (synchronous-read program memory:
// din holds the word at a one clock later), sin (sensor inputs), sout
// (signal outputs), timeout (timer outputs), irbus (instruction register),
// paef (an abort is pending), jaf (some ABORT is active) and abort_ovf
// (sticky: an ABORT was ignored because four levels were already active).
// The pins follow the processor's external view; the memory write path of
// the base processor is not part of this design.
module reflix
  import reflix_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic [DW-1:0]     din,
  input  logic [NSIN-1:0]   sin,
  output logic [AW-1:0]     a,
  output logic [DW-1:0]     irbus,
  output logic [NTIMER-1:0] timeout,
  output logic [NSOUT-1:0]  sout,
  output logic              paef,
  output logic              jaf,
  output logic              abort_ovf
);

  logic [NSIG-1:0]  rec;
  logic             take, decide, cyc_end;
  logic [AW-1:0]    cont_addr;
  logic             abort_push;
  logic [SIGNW-1:0] abort_sig;
  logic [AW-1:0]    abort_addr;
  logic             emit, sustain;
  logic [3:0]       sout_sel;
  logic             tload;
  logic [1:0]       tsel;
  logic [15:0]      tval;

  reflix_ctrl u_ctrl (
    .clk, .rst_n,
    .din, .addr(a), .irbus,
    .rec,
    .take, .cont_addr, .decide, .cyc_end,
    .abort_push, .abort_sig, .abort_addr,
    .emit, .sustain, .sout_sel,
    .tload, .tsel, .tval
  );

  ahb u_ahb (
    .clk, .rst_n,
    .rec, .cyc_end, .decide, .pc(a),
    .push(abort_push), .push_sig(abort_sig), .push_addr(abort_addr),
    .paef, .jaf, .take, .cont_addr, .ap(), .ovf(abort_ovf)
  );

  sir u_sir (
    .clk, .rst_n,
    .sig_in({timeout, sin}),
    .cyc_end,
    .rec
  );

  sor u_sor (
    .clk, .rst_n, .cyc_end,
    .emit, .sustain, .sel(sout_sel),
    .sout
  );

  timer_pool u_timers (
    .clk, .rst_n,
    .tick(cyc_end), .load(tload), .sel(tsel), .value(tval),
    .timeout
  );

endmodule
