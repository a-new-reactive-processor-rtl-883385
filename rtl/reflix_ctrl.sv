// reflix_ctrl: REFLIX control unit with program counter and instruction
// registers.
//
// Runs the instruction cycle of the reactive processor. Each instruction
// cycle starts with a decision clock (S_DECIDE):
//   * if the abort block reports a pending abort event (take), the cycle is
//     a preemptive termination: the PC is loaded with the continuation
//     address and the cycle ends there (one clock);
//   * otherwise the next instruction is fetched from the PC. In the same
//     clock the abort block checks for non-preemptive termination (the
//     fetch address reaching an active continuation address).
// A one-word instruction then takes S_LOAD1 and S_EXEC (3 clocks per
// instruction cycle), a two-word instruction S_LOAD1, S_LOAD2 and S_EXEC
// (4 clocks). The last clock of every instruction cycle raises cyc_end.
//
// Instructions (encoding in reflix_pkg):
//   JMP a          PC <= a
//   ABORT s, a     activate an abort level watching s, continuation a
//   EMIT s         Sout[s] high for one instruction cycle
//   SUSTAIN s      Sout[s] high for ever
//   SAWAIT s       re-execute every instruction cycle until s is present
//   TAWAIT d       re-execute until d instruction cycles have passed
//   CAWAIT s1,s2,a s1 present: continue; else s2 present: PC <= a;
//                  else re-execute
//   PRESENT s, a   s present: continue; else PC <= a
//   TSTART t, d    load timer t with d (0 stops it)
//   NOP and unknown opcodes do nothing.
// A signal is present in an instruction cycle if the Signal Input Register
// recorded it during that cycle. Busy waits re-execute as whole instruction
// cycles so that an active ABORT can preempt them between two tries.
//
// Memory: addr is the PC; din must hold the word at addr one clock later
// (synchronous read). The instruction set and the order of decisions are
// the processor's; the encoding, the clock counts, the memory timing, the
// TSTART instruction and JMP's two-word form are this design's choices.
module reflix_ctrl
  import reflix_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  // memory
  input  logic [DW-1:0]    din,
  output logic [AW-1:0]    addr,
  output logic [DW-1:0]    irbus,
  // signal input register
  input  logic [NSIG-1:0]  rec,
  // abort handling block
  input  logic             take,
  input  logic [AW-1:0]    cont_addr,
  output logic             decide,
  output logic             cyc_end,
  output logic             abort_push,
  output logic [SIGNW-1:0] abort_sig,
  output logic [AW-1:0]    abort_addr,
  // signal output register
  output logic             emit,
  output logic             sustain,
  output logic [3:0]       sout_sel,
  // timer pool
  output logic             tload,
  output logic [1:0]       tsel,
  output logic [15:0]      tval
);

  typedef enum logic [2:0] {
    S_INIT, S_DECIDE, S_LOAD1, S_LOAD2, S_EXEC
  } state_e;

  state_e        state_q;
  logic [AW-1:0] pc_q;      // address of the next word to fetch
  logic [AW-1:0] ipc_q;     // address of the current instruction
  instr_t        ir_q;      // instruction word 0
  logic [DW-1:0] opr_q;     // instruction word 1
  logic          wait_q;    // a TAWAIT is counting
  logic [DW-1:0] wcnt_q;    // instruction cycles left for TAWAIT

  function automatic logic present(input logic [NSIG-1:0] r, input logic [SIGNW-1:0] s);
    present = (int'(s) < NSIG) ? r[s] : 1'b0;
  endfunction

  // Results of the execute clock.
  logic          pa, pb;
  logic          stay;      // re-execute the same instruction
  logic          branch;    // PC <= opr
  logic          tw_start, tw_done;

  always_comb begin
    pa       = present(rec, ir_q.sa);
    pb       = present(rec, ir_q.sb);
    stay     = 1'b0;
    branch   = 1'b0;
    tw_start = 1'b0;
    tw_done  = 1'b0;
    case (ir_q.op)
      OP_JMP:     branch = 1'b1;
      OP_SAWAIT:  stay = !pa;
      OP_CAWAIT:  begin
                    branch = !pa && pb;
                    stay   = !pa && !pb;
                  end
      OP_PRESENT: branch = !pa;
      OP_TAWAIT:  begin
                    if (!wait_q) begin
                      tw_start = (opr_q > DW'(1));
                      stay     = tw_start;
                    end else begin
                      tw_done = (wcnt_q == DW'(1));
                      stay    = !tw_done;
                    end
                  end
      default:    ;
    endcase
  end

  always_comb begin
    decide     = (state_q == S_DECIDE);
    cyc_end    = (state_q == S_EXEC) || take;
    abort_push = (state_q == S_EXEC) && ir_q.op == OP_ABORT;
    abort_sig  = ir_q.sa;
    abort_addr = opr_q;
    emit       = (state_q == S_EXEC) && ir_q.op == OP_EMIT;
    sustain    = (state_q == S_EXEC) && ir_q.op == OP_SUSTAIN;
    sout_sel   = ir_q.sa[3:0];
    tload      = (state_q == S_EXEC) && ir_q.op == OP_TSTART;
    tsel       = ir_q.sa[1:0];
    tval       = opr_q;
    addr       = pc_q;
    irbus      = ir_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_INIT;
      pc_q    <= '0;
      ipc_q   <= '0;
      ir_q    <= '0;
      opr_q   <= '0;
      wait_q  <= 1'b0;
      wcnt_q  <= '0;
    end else begin
      case (state_q)
        S_INIT: begin
          pc_q    <= '0;
          state_q <= S_DECIDE;
        end
        S_DECIDE: begin
          if (take) begin
            pc_q   <= cont_addr;
            wait_q <= 1'b0;
          end else begin
            ipc_q   <= pc_q;
            pc_q    <= pc_q + 1'b1;
            state_q <= S_LOAD1;
          end
        end
        S_LOAD1: begin
          ir_q <= din;
          if (two_words(din[15:11])) begin
            pc_q    <= pc_q + 1'b1;
            state_q <= S_LOAD2;
          end else begin
            state_q <= S_EXEC;
          end
        end
        S_LOAD2: begin
          opr_q   <= din;
          state_q <= S_EXEC;
        end
        S_EXEC: begin
          if (stay)        pc_q <= ipc_q;
          else if (branch) pc_q <= opr_q;
          if (tw_start) begin
            wait_q <= 1'b1;
            wcnt_q <= opr_q - 1'b1;
          end else if (wait_q) begin
            if (tw_done) wait_q <= 1'b0;
            wcnt_q <= wcnt_q - 1'b1;
          end
          state_q <= S_DECIDE;
        end
        default: state_q <= S_INIT;
      endcase
    end
  end

  a_one_cycle_end : assert property (@(posedge clk) disable iff (!rst_n)
    cyc_end |-> (state_q == S_EXEC) != (state_q == S_DECIDE));

endmodule
