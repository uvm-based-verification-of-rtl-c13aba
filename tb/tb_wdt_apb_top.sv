// tb_wdt_apb_top: end-to-end test of the watchdog timer with APB interface,
// at the design's default parameters.
//
// An APB master (apb_if) configures the timeout register while a process
// standing in for the supervised system drives activity_in. A reference
// model tracks the register map and, independently of the design's counter,
// the cycles since the last kick; interrupt and reset are checked on every
// cycle against it. The scenarios follow the verification plan of the
// reference design:
//   * reset value of the timeout (30 cycles) and a timeout right after reset;
//   * APB write and read of the timeout register, and unmapped addresses
//     answering with PSLVERR;
//   * the watchdog test: timeout set to 20 (0x14), activity_in held back,
//     interrupt and reset rising exactly 20 cycles after the last kick;
//   * regular kicks keeping the watchdog quiet, recovery after a timeout;
//   * a random phase of APB transfers and kicks running at the same time.
// Every mechanism (write, read, error response, restart, timeout, recovery)
// is counted and must have happened at least once.
module tb_wdt_apb_top;

  localparam int unsigned ADDR_W = 8;
  localparam int unsigned DATA_W = 32;
  localparam logic [ADDR_W-1:0] REG_ADDR  = 8'h10;
  localparam logic [DATA_W-1:0] REG_RESET = 32'h0000_001E;
  localparam int unsigned MAX_CYCLES = 50000;

  logic pclk = 1'b0;
  logic prst;
  logic activity_in;
  logic interrupt, reset;
  logic [DATA_W-1:0] timer_value_out, count;

  int checks   = 0;
  int failures = 0;
  int n_writes = 0, n_reads = 0, n_errors = 0;
  int n_timeouts = 0, n_restarts = 0, n_recoveries = 0;

  // Reference model.
  logic [DATA_W-1:0] model_reg;
  longint unsigned   since, t_loaded;
  logic              exp_to;

  apb_if #(.ADDR_W(ADDR_W), .DATA_W(DATA_W)) bus (.pclk);

  wdt_apb_top dut (
    .pclk, .prst,
    .psel(bus.psel), .penable(bus.penable), .pwrite(bus.pwrite),
    .paddr(bus.paddr), .pwdata(bus.pwdata), .prdata(bus.prdata),
    .pready(bus.pready), .pslverr(bus.pslverr),
    .activity_in, .interrupt, .reset, .timer_value_out, .count
  );

  always #5 pclk = ~pclk;

  initial begin
    repeat (MAX_CYCLES) @(posedge pclk);
    failures++;
    $display("top: simulation did not finish in %0d cycles", MAX_CYCLES);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("top check failed at %0t: %s", $time, what);
    end
  endtask

  // Watchdog model: the register value seen by the timer is the one before
  // this edge's write, so the model register is sampled before it updates.
  always @(posedge pclk) begin
    logic prev_to;
    logic [DATA_W-1:0] reg_before;
    reg_before = model_reg;
    prev_to = exp_to;
    if (prst || activity_in) begin
      if (!prst && prev_to) n_recoveries++;
      else if (!prst && since > 0) n_restarts++;
      since    = 0;
      t_loaded = prst ? longint'(REG_RESET) : longint'(reg_before);
    end else begin
      since++;
    end
    exp_to = (since >= t_loaded);
    if (exp_to && !prev_to) n_timeouts++;
    // APB write to the register takes effect at this edge.
    if (prst) model_reg = REG_RESET;
    else if (bus.psel && bus.penable && bus.pwrite && bus.paddr == REG_ADDR)
      model_reg = bus.pwdata;
    #1;
    check(interrupt == exp_to && reset == exp_to,
          $sformatf("interrupt=%b reset=%b expected %b (since=%0d T=%0d)",
                    interrupt, reset, exp_to, since, t_loaded));
    check(timer_value_out == model_reg,
          $sformatf("timer_value_out 0x%08h expected 0x%08h", timer_value_out, model_reg));
  end

  task automatic apb_write(input logic [ADDR_W-1:0] a, input logic [DATA_W-1:0] d);
    logic err;
    bus.write(a, d, err);
    n_writes++;
    if (a != REG_ADDR) n_errors++;
    check(err == (a != REG_ADDR), $sformatf("write 0x%02h pslverr=%b", a, err));
    check(bus.last_cycles == 2, $sformatf("write took %0d cycles", bus.last_cycles));
  endtask

  task automatic apb_read(input logic [ADDR_W-1:0] a);
    logic err;
    logic [DATA_W-1:0] d, expd;
    expd = (a == REG_ADDR) ? model_reg : '0;
    bus.read(a, d, err);
    n_reads++;
    if (a != REG_ADDR) n_errors++;
    check(err == (a != REG_ADDR), $sformatf("read 0x%02h pslverr=%b", a, err));
    check(d == expd, $sformatf("read 0x%02h gave 0x%08h expected 0x%08h", a, d, expd));
  endtask

  task automatic kick();
    @(negedge pclk) activity_in = 1'b1;
    @(negedge pclk) activity_in = 1'b0;
  endtask

  // Cycles from the last kick until interrupt and reset rise.
  task automatic timeout_latency(int expected);
    int n = 0;
    kick();
    while (!(interrupt && reset) && n < 100000) begin
      @(negedge pclk);
      n++;
    end
    check(n == expected, $sformatf("timeout after %0d cycles, expected %0d", n, expected));
  endtask

  initial begin
    bus.idle();
    activity_in = 1'b0;
    model_reg = REG_RESET; since = 0; t_loaded = longint'(REG_RESET); exp_to = 1'b0;
    prst = 1'b1;
    repeat (3) @(negedge pclk);
    prst = 1'b0;

    // Default timeout runs out 30 cycles after reset.
    timeout_latency(30);
    apb_read(REG_ADDR);

    // APB write/read test of the register map.
    apb_write(REG_ADDR, 32'h0000_0014);
    apb_read(REG_ADDR);
    apb_write(8'h00, 32'h7ba2_3526);
    apb_write(8'h08, 32'h4cc7_55d5);
    apb_read(8'h04);
    apb_read(REG_ADDR);

    // Watchdog test: timeout 0x14, activity held back.
    timeout_latency(20);
    repeat (5) @(negedge pclk);
    // Kicks every 15 cycles keep a 20-cycle timeout from firing.
    repeat (8) begin
      kick();
      repeat (13) @(negedge pclk);
    end
    check(!interrupt && !reset, "kicked watchdog stayed quiet");

    // Reconfigure while running, then time out with the new value.
    apb_write(REG_ADDR, 32'd45);
    timeout_latency(45);

    // Random phase: APB traffic and kicks in parallel.
    fork
      repeat (300) begin
        logic [ADDR_W-1:0] a;
        a = ($urandom_range(0, 2) != 0) ? REG_ADDR : ADDR_W'($urandom_range(0, 4) * 4);
        if ($urandom_range(0, 1) == 1) apb_write(a, DATA_W'($urandom_range(0, 60)));
        else apb_read(a);
        repeat ($urandom_range(0, 3)) @(negedge pclk);
      end
      repeat (150) begin
        @(negedge pclk) activity_in = ($urandom_range(0, 3) == 0);
        repeat ($urandom_range(1, 40)) @(negedge pclk);
      end
    join
    activity_in = 1'b0;
    apb_write(REG_ADDR, 32'd10);
    timeout_latency(10);
    repeat (5) @(negedge pclk);

    check(n_writes > 0,     "APB write seen");
    check(n_reads > 0,      "APB read seen");
    check(n_errors > 0,     "PSLVERR response seen");
    check(n_timeouts > 0,   "timeout seen");
    check(n_restarts > 0,   "restart by activity_in seen");
    check(n_recoveries > 0, "recovery after timeout seen");
    $display("top: writes=%0d reads=%0d errors=%0d timeouts=%0d restarts=%0d recoveries=%0d",
             n_writes, n_reads, n_errors, n_timeouts, n_restarts, n_recoveries);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
