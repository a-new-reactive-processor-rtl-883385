// sir: Signal Input Register.
//
// Samples the monitored signals (Sin and the timer time-outs) every clock and
// records, per signal, whether it has been seen high at any clock of the
// current instruction cycle. Polling instructions test this record, and the
// abort logic evaluates it when the instruction cycle ends, so that events
// of one instruction cycle are acted on in the next one.
//
// Interface: sig_in is registered once (one clock of input latency). rec is
// the record including the current clock's sample; on the clock where
// cyc_end is high the record is cleared so that the next cycle starts empty.
// The per-cycle recording follows the processor's description; the single
// input register stage is this design's choice.
module sir #(
  parameter int unsigned NSIG = reflix_pkg::NSIG
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [NSIG-1:0] sig_in,
  input  logic            cyc_end,
  output logic [NSIG-1:0] rec
);

  logic [NSIG-1:0] sample_q;   // sig_in, one clock late
  logic [NSIG-1:0] seen_q;     // seen on an earlier clock of this cycle

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sample_q <= '0;
      seen_q   <= '0;
    end else begin
      sample_q <= sig_in;
      seen_q   <= cyc_end ? '0 : rec;
    end
  end

  assign rec = seen_q | sample_q;

endmodule
