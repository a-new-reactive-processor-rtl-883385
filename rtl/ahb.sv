// ahb: Abort Handling Block.
//
// Keeps the stack of active ABORT instructions and decides preemption.
// Level 0 is the outermost ABORT and has the highest priority, level
// NLEVEL-1 the innermost. Per level it holds the continuation address
// (AAAR) and a one-hot mask of the watched signal (AASR); AF holds one
// active flag per level, AP the number of active levels (the next free
// level). JAF is high when any ABORT is active and JASR is the OR of the
// masks of the active levels.
//
// At the end of every instruction cycle (cyc_end) the signals recorded by
// the Signal Input Register during that cycle are ANDed with JASR and ORed
// into PAEF (pending abort event flag); AXP records the outermost level
// whose signal was seen. In the first clock of the next instruction cycle
// (decide):
//   * PAEF set   -> preemptive termination: take = 1, cont_addr = AAAR[AXP],
//                   level AXP and all levels inside it are deactivated;
//   * PAEF clear -> if JAF, non-preemptive termination: the outermost active
//                   level whose continuation address equals the fetch
//                   address pc is deactivated together with all inner ones.
// push (the execution of an ABORT, on a cyc_end clock) activates level AP.
// The new level is not part of the PAEF decision taken at that same clock,
// so events of the ABORT's own instruction cycle do not trigger it. A push
// with all levels in use is ignored and sets the sticky ovf flag.
//
// Register names and the PAEF / JAF / AND-OR structure follow the
// processor's block diagram; the meaning given to AP and AXP, the overflow
// behaviour and the AASR width (NSIG bits, so that timer time-outs can be
// watched too) are this design's reading.
module ahb #(
  parameter int unsigned NLEVEL = reflix_pkg::NLEVEL,
  parameter int unsigned NSIG   = reflix_pkg::NSIG,
  parameter int unsigned AW     = reflix_pkg::AW
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [NSIG-1:0]            rec,
  input  logic                       cyc_end,
  input  logic                       decide,
  input  logic [AW-1:0]              pc,
  input  logic                       push,
  input  logic [reflix_pkg::SIGNW-1:0] push_sig,
  input  logic [AW-1:0]              push_addr,
  output logic                       paef,
  output logic                       jaf,
  output logic                       take,
  output logic [AW-1:0]              cont_addr,
  output logic [$clog2(NLEVEL+1)-1:0] ap,
  output logic                       ovf
);

  localparam int unsigned LW = $clog2(NLEVEL);
  localparam int unsigned PW = $clog2(NLEVEL+1);

  logic [AW-1:0]     aaar_q [NLEVEL];
  logic [NSIG-1:0]   aasr_q [NLEVEL];
  logic [NLEVEL-1:0] af_q;
  logic [PW-1:0]     ap_q;
  logic [LW-1:0]     axp_q;
  logic [NSIG-1:0]   jasr_q;
  logic              paef_q;
  logic              ovf_q;

  // Next-state of the level stack.
  logic [NLEVEL-1:0] af_n;
  logic [PW-1:0]     ap_n;
  logic [NSIG-1:0]   jasr_n;

  // Non-preemptive termination: outermost active level whose continuation
  // address is the fetch address.
  logic              np_hit;
  logic [LW-1:0]     np_lvl;

  // Event evaluation at the end of the cycle.
  logic [NLEVEL-1:0] keep;       // levels still active after this clock's terminations
  logic [NSIG-1:0]   jasr_eval;  // watched signals of those levels
  logic              hit_any;
  logic [LW-1:0]     hit_lvl;

  assign take      = decide && paef_q;
  assign cont_addr = aaar_q[axp_q];

  always_comb begin
    np_hit = 1'b0;
    np_lvl = '0;
    for (int i = NLEVEL - 1; i >= 0; i--) begin
      if (af_q[i] && aaar_q[i] == pc) begin
        np_hit = 1'b1;
        np_lvl = LW'(i);
      end
    end
  end

  // Levels that survive this clock: a preemption removes AXP and inward, a
  // non-preemptive termination removes np_lvl and inward.
  always_comb begin
    keep = af_q;
    ap_n = ap_q;
    if (take) begin
      ap_n = PW'(axp_q);
    end else if (decide && jaf && np_hit) begin
      ap_n = PW'(np_lvl);
    end
    for (int i = 0; i < NLEVEL; i++) keep[i] = af_q[i] && (i < int'(ap_n));
  end

  always_comb begin
    jasr_eval = '0;
    for (int i = 0; i < NLEVEL; i++) if (keep[i]) jasr_eval |= aasr_q[i];
    // JASR already holds the watched signals unless levels end this clock.
    hit_any = |(rec & ((keep == af_q) ? jasr_q : jasr_eval));
    hit_lvl = '0;
    for (int i = NLEVEL - 1; i >= 0; i--)
      if (keep[i] && |(rec & aasr_q[i])) hit_lvl = LW'(i);
  end

  // Activation on top of the surviving levels.
  always_comb begin
    af_n   = keep;
    jasr_n = jasr_eval;
    if (push && int'(ap_n) < NLEVEL) begin
      af_n[ap_n[LW-1:0]] = 1'b1;
      jasr_n             = jasr_eval | (NSIG'(1) << push_sig);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NLEVEL; i++) begin
        aaar_q[i] <= '0;
        aasr_q[i] <= '0;
      end
      af_q   <= '0;
      ap_q   <= '0;
      axp_q  <= '0;
      jasr_q <= '0;
      paef_q <= 1'b0;
      ovf_q  <= 1'b0;
    end else begin
      af_q   <= af_n;
      jasr_q <= jasr_n;
      ap_q   <= ap_n;
      if (push) begin
        if (int'(ap_n) < NLEVEL) begin
          aaar_q[ap_n[LW-1:0]] <= push_addr;
          aasr_q[ap_n[LW-1:0]] <= NSIG'(1) << push_sig;
          ap_q                 <= ap_n + 1'b1;
        end else begin
          ovf_q <= 1'b1;
        end
      end
      if (cyc_end) begin
        paef_q <= hit_any;
        axp_q  <= hit_lvl;
      end else if (take) begin
        paef_q <= 1'b0;
      end
    end
  end

  assign paef = paef_q;
  assign jaf  = |af_q;
  assign ap   = ap_q;
  assign ovf  = ovf_q;

  // The flags, the pointer and the joint mask describe the same stack.
  a_af_ap : assert property (@(posedge clk) disable iff (!rst_n)
    af_q == NLEVEL'((1 << ap_q) - 1));
  a_ap_range : assert property (@(posedge clk) disable iff (!rst_n) ap_q <= PW'(NLEVEL));
  a_jasr : assert property (@(posedge clk) disable iff (!rst_n)
    (keep == af_q) |-> jasr_q == jasr_eval);
  a_paef_active : assert property (@(posedge clk) disable iff (!rst_n)
    paef_q |-> af_q[axp_q]);

endmodule
