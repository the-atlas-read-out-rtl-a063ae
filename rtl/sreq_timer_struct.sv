// sreq_timer_struct: global busy time-out service requester.
//
// Two 16-bit counters, each with a VME-programmed register and a comparator,
// both clocked at 10 MHz:
//   * the interval counter counts every clock; when it has counted `interval`
//     clocks it restarts and clears the limit counter, so the busy time is
//     judged over windows of `interval` x 100 ns (an interval of 0 clears the
//     counters on every clock);
//   * the limit counter counts the clocks on which the global busy is true;
//     when it reaches `limit` within one window and the requester is enabled,
//     the service request is set.
// The request stays set until software clears it (or reset); software can
// also set it directly, and the enable bit gates only the timer's own
// setting. sreq drives the VME interrupter. The counters, registers and
// comparators follow the description; the window semantics at the
// boundaries, the latched request and the precedence of clear over set are
// this design's choices.
module sreq_timer_struct #(
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         busy,       // synchronised global busy
  input  logic [W-1:0] interval,
  input  logic [W-1:0] limit,
  input  logic         enable,     // service requester enabled
  input  logic         sw_set,     // software set of the request
  input  logic         sw_clr,     // software clear of the request
  output logic         sreq,
  output logic [W-1:0] interval_cnt,
  output logic [W-1:0] limit_cnt
);
  logic         window_end;
  logic [W-1:0] lim_next;
  logic         limit_hit;

  // Interval comparator: the current clock is the last of the window.
  assign window_end = ({1'b0, interval_cnt} + 1'b1) >= {1'b0, interval};
  // Limit counter including this clock's busy tick, saturating.
  assign lim_next   = (busy && limit_cnt != {W{1'b1}}) ? limit_cnt + 1'b1 : limit_cnt;
  // Limit comparator.
  assign limit_hit  = busy && (lim_next >= limit);

  always_ff @(posedge clk) begin
    if (rst) begin
      interval_cnt <= '0;
      limit_cnt    <= '0;
      sreq         <= 1'b0;
    end else begin
      interval_cnt <= window_end ? '0 : interval_cnt + 1'b1;
      limit_cnt    <= window_end ? '0 : lim_next;
      if (sw_clr)
        sreq <= 1'b0;
      else if (sw_set || (enable && limit_hit))
        sreq <= 1'b1;
    end
  end
endmodule
