// timer_pool: the internal timers that generate programmable time-out signals.
//
// NTIMER one-shot down-counters count instruction cycles (tick = last clock
// of an instruction cycle). Loading timer t with delay d (on a tick clock)
// lets d further instruction cycles complete, then raises TimeOut[t] for
// exactly the one instruction cycle after them; the timer then stops. Loading
// 0 stops a timer without a time-out. The time-outs leave the processor and
// are also fed back to the Signal Input Register, so that ABORT and the
// polling instructions can use them.
//
// Counting in instruction cycles, one-shot operation and the load interface
// (the TSTART instruction) are this design's choices; the processor
// description only gives the number of timers and their time-out lines.
module timer_pool #(
  parameter int unsigned NTIMER = reflix_pkg::NTIMER,
  parameter int unsigned TW     = 16
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      tick,
  input  logic                      load,
  input  logic [$clog2(NTIMER)-1:0] sel,
  input  logic [TW-1:0]             value,
  output logic [NTIMER-1:0]         timeout
);

  logic [TW-1:0]     cnt_q [NTIMER];
  logic [NTIMER-1:0] run_q;
  logic [NTIMER-1:0] to_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run_q <= '0;
      to_q  <= '0;
      for (int t = 0; t < NTIMER; t++) cnt_q[t] <= '0;
    end else if (tick) begin
      for (int t = 0; t < NTIMER; t++) begin
        to_q[t] <= 1'b0;
        if (load && sel == t[$clog2(NTIMER)-1:0]) begin
          cnt_q[t] <= value;
          run_q[t] <= (value != '0);
        end else if (run_q[t]) begin
          if (cnt_q[t] == TW'(1)) begin
            to_q[t]  <= 1'b1;
            run_q[t] <= 1'b0;
          end
          cnt_q[t] <= cnt_q[t] - 1'b1;
        end
      end
    end
  end

  assign timeout = to_q;

endmodule
