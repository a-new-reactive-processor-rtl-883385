// sor: Signal Output Register.
//
// Drives the signal output lines Sout. EMIT raises one line for one
// instruction cycle; SUSTAIN raises a line for ever (until reset).
//
// Interface: emit / sustain are one-clock requests from the control unit,
// given on the last clock of the instruction cycle that executes the
// instruction (cyc_end high). The line rises on the next clock. An emitted
// line stays high through the whole following instruction cycle and falls
// after that cycle's cyc_end, unless it is emitted again. sout is straight
// from flip-flops.
module sor #(
  parameter int unsigned NSOUT = reflix_pkg::NSOUT
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     cyc_end,
  input  logic                     emit,
  input  logic                     sustain,
  input  logic [$clog2(NSOUT)-1:0] sel,
  output logic [NSOUT-1:0]         sout
);

  logic [NSOUT-1:0] emit_q;     // lines emitted for the current cycle
  logic [NSOUT-1:0] sust_q;     // sustained lines
  logic [NSOUT-1:0] onehot;

  always_comb onehot = NSOUT'(1) << sel;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      emit_q <= '0;
      sust_q <= '0;
    end else begin
      if (cyc_end) emit_q <= emit ? onehot : '0;
      if (sustain) sust_q <= sust_q | onehot;
    end
  end

  assign sout = emit_q | sust_q;

endmodule
