// tb_watchdog_timer: self-checking test of the watchdog down-counter.
//
// Inputs change on the falling edge of pclk; outputs are checked just after
// each rising edge against a reference model that works from elapsed cycles
// rather than from a counter: after the last cycle in which activity_in (or
// prst) was sampled high, with T the timer_value sampled in that cycle (the
// reset count after prst), the
// watchdog must report a timeout exactly when T or more cycles have passed.
// A directed part checks the timeout latency with T = 20 (0x14), a kick
// that restarts the timer before it runs out, recovery from a timeout, and
// T = 0; a random part then drives random kick gaps and timeout values.
module tb_watchdog_timer;

  localparam int unsigned DATA_W = 32;
  localparam int unsigned MAX_CYCLES = 20000;
  localparam logic [DATA_W-1:0] RESET_COUNT = 32'd30;

  logic              pclk = 1'b0;
  logic              prst;
  logic [DATA_W-1:0] timer_value;
  logic              activity_in;
  logic              interrupt;
  logic              reset;
  logic [DATA_W-1:0] count;

  int checks   = 0;
  int failures = 0;
  int n_timeouts = 0, n_restarts = 0, n_recoveries = 0;

  // Reference model state.
  longint unsigned since;      // cycles since the last reload
  longint unsigned t_loaded;   // timeout taken at the last reload
  logic            exp_to;

  watchdog_timer #(.DATA_W(DATA_W), .RESET_COUNT(RESET_COUNT)) dut (
    .pclk, .prst, .timer_value, .activity_in, .interrupt, .reset, .count
  );

  always #5 pclk = ~pclk;

  initial begin
    repeat (MAX_CYCLES) @(posedge pclk);
    failures++;
    $display("watchdog: simulation did not finish in %0d cycles", MAX_CYCLES);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Model update and check at every rising edge.
  always @(posedge pclk) begin
    logic prev_to;
    prev_to = exp_to;
    if (prst || activity_in) begin
      // A kick that lands while the timer is still running restarts it;
      // one that lands after a timeout recovers from it.
      if (!prst && prev_to) n_recoveries++;
      else if (!prst && since > 0) n_restarts++;
      since    = 0;
      t_loaded = prst ? longint'(RESET_COUNT) : longint'(timer_value);
    end else begin
      since++;
    end
    exp_to = (since >= t_loaded);
    if (exp_to && !prev_to) n_timeouts++;
    #1;
    checks++;
    if (interrupt !== exp_to || reset !== exp_to) begin
      failures++;
      $display("watchdog mismatch at %0t: interrupt=%b reset=%b expected %b (since=%0d T=%0d)",
               $time, interrupt, reset, exp_to, since, t_loaded);
    end
  end

  task automatic cycles(int n);
    repeat (n) @(negedge pclk);
  endtask

  task automatic kick();
    @(negedge pclk) activity_in = 1'b1;
    @(negedge pclk) activity_in = 1'b0;
  endtask

  // Cycles from the kick to the rising interrupt.
  task automatic measure_latency(int t);
    int n;
    timer_value = DATA_W'(t);
    kick();
    // The kick was sampled at the edge before this negedge: the count starts.
    n = 0;
    while (!interrupt && n < 1000) begin
      @(negedge pclk);
      n++;
    end
    // interrupt is checked at the negedge after the edge on which it rose.
    checks++;
    if (n != t) begin
      failures++;
      $display("watchdog latency for T=%0d: %0d cycles", t, n);
    end
  endtask

  initial begin
    since = 0; t_loaded = 0; exp_to = 1'b0;
    prst = 1'b1; activity_in = 1'b0; timer_value = 32'd30;
    cycles(3);
    prst = 1'b0;
    // Runs out after reset with no kick at all.
    cycles(40);
    // Timeout latency for the timer value used in the reference waveform.
    measure_latency(20);
    measure_latency(1);
    measure_latency(7);
    // Kicks every 10 cycles keep a 20-cycle watchdog quiet.
    timer_value = 32'd20;
    repeat (6) begin kick(); cycles(9); end
    // T = 0 loads zero: the timeout is reported at once.
    timer_value = 32'd0;
    kick();
    cycles(3);
    // A new timer value applies only at the next reload.
    timer_value = 32'd12;
    kick();
    timer_value = 32'd3;
    cycles(15);
    // Random kicks and timeout values.
    repeat (400) begin
      if ($urandom_range(0, 9) == 0) timer_value = DATA_W'($urandom());   // huge: never runs out here
      else timer_value = DATA_W'($urandom_range(0, 25));
      activity_in = ($urandom_range(0, 3) == 0);
      if ($urandom_range(0, 50) == 0) prst = 1'b1; else prst = 1'b0;
      cycles($urandom_range(1, 30));
    end
    prst = 1'b0; activity_in = 1'b0; timer_value = 32'd5;
    kick();
    cycles(10);
    // Each mechanism must have happened.
    checks++; if (n_timeouts == 0)   begin failures++; $display("no timeout seen"); end
    checks++; if (n_restarts == 0)   begin failures++; $display("no restart seen"); end
    checks++; if (n_recoveries == 0) begin failures++; $display("no recovery seen"); end
    $display("watchdog: timeouts=%0d restarts=%0d recoveries=%0d",
             n_timeouts, n_restarts, n_recoveries);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
