// watchdog_timer: down-counter that times out when the supervised system
// stops showing activity.
//
// Every pclk cycle in which activity_in is high loads the counter with
// timer_value. Otherwise the counter counts down by one per cycle and stops
// at zero. While the counter is zero the watchdog has timed out and drives
// both interrupt and reset high; they stay high until activity_in reloads
// the counter (or prst). So after the last cycle with activity_in high, with
// T = timer_value, interrupt and reset rise exactly T cycles later.
// A kick at least every T cycles keeps it quiet; with T = 0 the counter is
// loaded with zero and the watchdog reports a timeout continuously.
//
// The reference design gives the ports (timer_value, activity_in, interrupt,
// reset, clocked by pclk), the restart on every activity_in and the timeout
// after timer_value without activity; counting down to zero follows its
// description of a watchdog. Choices of this design: activity_in is a level
// sampled on pclk (synchronous to it), interrupt and reset are the same
// timeout condition, a new timer_value takes effect at the next reload, and
// prst (active high, synchronous) loads the counter with RESET_COUNT, the
// reset value of the timeout register, so the timer starts running out of
// reset without depending on a register that is being reset in the same
// cycle.
//
// Timing: interrupt and reset are decoded from the counter register only.
module watchdog_timer #(
  parameter int unsigned       DATA_W      = wdt_apb_pkg::APB_DATA_W,
  parameter logic [DATA_W-1:0] RESET_COUNT = DATA_W'(wdt_apb_pkg::WDT_TIMER_RESET)
) (
  input  logic              pclk,
  input  logic              prst,
  input  logic [DATA_W-1:0] timer_value,
  input  logic              activity_in,
  output logic              interrupt,
  output logic              reset,
  output logic [DATA_W-1:0] count
);

  logic expired;

  assign expired = (count == '0);

  always_ff @(posedge pclk) begin
    if (prst)
      count <= RESET_COUNT;
    else if (activity_in)
      count <= timer_value;
    else if (!expired)
      count <= count - 1'b1;
  end

  assign interrupt = expired;
  assign reset     = expired;

endmodule
