// reflix_pkg: sizes, signal numbering and instruction encoding shared by the
// REFLIX reactive processor.
//
// Sizes follow the processor's first prototype: 16 sensor inputs Sin, 16
// signal outputs Sout, four internal timers, four nesting levels of ABORT and
// 16-bit instructions and addresses. The binary instruction encoding is this
// design's own; only the mnemonics, the operands and the one- or two-word
// lengths are fixed by the architecture.
//
// Instruction word 0:  [15:11] opcode  [10:6] signal a  [5:1] signal b  [0] 0
// Instruction word 1:  address or delay (two-word instructions only)
//
// Signal numbers 0..15 name Sin[15:0]; 16..19 name TimeOut[3:0]. For EMIT
// and SUSTAIN, signal a[3:0] names the Sout line; for TSTART it names the timer.
package reflix_pkg;

  localparam int unsigned NSIN   = 16;            // sensor input lines Sin
  localparam int unsigned NSOUT  = 16;            // signal output lines Sout
  localparam int unsigned NTIMER = 4;             // internal timers
  localparam int unsigned NSIG   = NSIN + NTIMER; // signals an instruction can test
  localparam int unsigned NLEVEL = 4;             // ABORT nesting levels
  localparam int unsigned AW     = 16;            // address width
  localparam int unsigned DW     = 16;            // instruction / data width
  localparam int unsigned SIGNW  = 5;             // width of a signal number

  typedef enum logic [4:0] {
    OP_NOP     = 5'd0,
    OP_JMP     = 5'd1,   // JMP address                 (2 words)
    OP_ABORT   = 5'd2,   // ABORT signal, address       (2 words)
    OP_EMIT    = 5'd3,   // EMIT signal                 (1 word)
    OP_SUSTAIN = 5'd4,   // SUSTAIN signal              (1 word)
    OP_SAWAIT  = 5'd5,   // SAWAIT signal               (1 word)
    OP_TAWAIT  = 5'd6,   // TAWAIT delay                (2 words)
    OP_CAWAIT  = 5'd7,   // CAWAIT signal1, signal2, address (2 words)
    OP_PRESENT = 5'd8,   // PRESENT signal, address     (2 words)
    OP_TSTART  = 5'd9    // TSTART timer, delay         (2 words)
  } opcode_e;

  typedef struct packed {
    opcode_e          op;
    logic [SIGNW-1:0] sa;
    logic [SIGNW-1:0] sb;
    logic             rsvd;
  } instr_t;

  // True for instructions that carry a second word.
  function automatic logic two_words(input logic [4:0] op);
    case (op)
      OP_JMP, OP_ABORT, OP_TAWAIT, OP_CAWAIT, OP_PRESENT, OP_TSTART: two_words = 1'b1;
      default:                                                       two_words = 1'b0;
    endcase
  endfunction

  // Assemble instruction word 0.
  function automatic logic [DW-1:0] enc(input opcode_e op,
                                        input logic [SIGNW-1:0] sa = '0,
                                        input logic [SIGNW-1:0] sb = '0);
    enc = {op, sa, sb, 1'b0};
  endfunction

endpackage
