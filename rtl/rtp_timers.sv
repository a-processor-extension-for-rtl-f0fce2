// rtp_timers: the bank of deadline timers ($t0..$t3).
//
// Each timer is a W-bit down-counter that decrements once per clock and
// stops at zero. A dead/deadi instruction names one timer (sel). The bank
// reports `expired` when that timer reaches zero in the current cycle,
// that is when its count is 1 (it becomes 0 at this clock edge) or already
// 0. While `expired` is low the core stalls on the deadline. When the core
// asserts `reload` (the deadline completes), the selected timer is loaded
// with `value` at the clock edge instead of counting; the other timers
// keep counting.
//
// Timing: a timer reloaded with N at the end of cycle c expires in cycle
// c+N, so the instruction after the next deadline on that timer runs in
// cycle c+N+1: consecutive deadlines on one timer complete exactly N cycles
// apart, provided the code between them takes fewer than N cycles. If the
// timer has already run out, the deadline completes at once. Counting to
// zero and stopping, and reloading on completion, follow the published
// description; treating "reaches zero" as the count reaching zero at the
// end of the cycle is this design's reading of its worked example (an
// 8-cycle deadline separating two adds by eight cycles). Reset clears all
// timers.
module rtp_timers #(
  parameter int unsigned W       = 16,
  parameter int unsigned NTIMERS = 4
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic [$clog2(NTIMERS)-1:0] sel,
  output logic                       expired,
  input  logic                       reload,
  input  logic [W-1:0]               value,
  output logic [W-1:0]               count [NTIMERS]
);

  logic [W-1:0] t [NTIMERS];

  assign expired = (t[sel] <= W'(1));

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < int'(NTIMERS); i++) t[i] <= '0;
    end else begin
      for (int i = 0; i < int'(NTIMERS); i++) begin
        if (reload && (sel == i[$clog2(NTIMERS)-1:0])) t[i] <= value;
        else if (t[i] != '0)                          t[i] <= t[i] - W'(1);
      end
    end
  end

  assign count = t;

  // A deadline may only complete once its timer has run out.
  property p_reload_only_when_expired;
    @(posedge clk) disable iff (rst) reload |-> expired;
  endproperty
  assert property (p_reload_only_when_expired)
    else $error("rtp_timers: reload of a timer that has not expired");

endmodule
