// tb_wdt_apb_random: random-stimulus test of the whole watchdog with APB
// interface, checked cycle by cycle.
//
// Every input is drawn at random on each falling edge of pclk: the APB
// signals (within the protocol: a setup phase is always followed by its
// access phase with the same address, direction and data), activity_in and,
// rarely, prst. A cycle-level reference model predicts, for every cycle,
// PREADY, PSLVERR and PRDATA (combinational responses), the timeout register
// and the watchdog outputs, with the timeout tracked as cycles elapsed since
// the last kick. The run counts writes, reads, error responses, timeouts and
// resets taken, and requires each to have occurred.
module tb_wdt_apb_random;

  localparam int unsigned ADDR_W = 8;
  localparam int unsigned DATA_W = 32;
  localparam logic [ADDR_W-1:0] REG_ADDR  = 8'h10;
  localparam logic [DATA_W-1:0] REG_RESET = 32'h0000_001E;
  localparam int unsigned CYCLES = 20000;

  logic pclk = 1'b0;
  logic prst, psel, penable, pwrite, activity_in;
  logic [ADDR_W-1:0] paddr;
  logic [DATA_W-1:0] pwdata, prdata, timer_value_out, count;
  logic pready, pslverr, interrupt, reset;

  int checks = 0, failures = 0;
  int n_writes = 0, n_reads = 0, n_errors = 0, n_timeouts = 0, n_resets = 0;

  logic [DATA_W-1:0] model_reg;
  longint unsigned   since, t_loaded;
  logic              exp_to;

  wdt_apb_top dut (.*);

  always #5 pclk = ~pclk;

  initial begin
    repeat (CYCLES + 1000) @(posedge pclk);
    failures++;
    $display("random: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("random check failed at %0t: %s", $time, what);
    end
  endtask

  // Combinational APB response, checked just before each rising edge.
  always @(negedge pclk) begin
    #4;
    if (!prst) begin
      logic acc, hit;
      acc = psel && penable;
      hit = (paddr == REG_ADDR);
      check(pready == acc, "pready");
      check(pslverr == (acc && !hit), "pslverr");
      check(prdata == ((acc && !pwrite && hit) ? model_reg : '0),
            $sformatf("prdata 0x%08h model 0x%08h", prdata, model_reg));
      if (acc && pwrite) n_writes++;
      if (acc && !pwrite) n_reads++;
      if (acc && !hit) n_errors++;
    end
  end

  // Sequential model, checked just after each rising edge.
  always @(posedge pclk) begin
    logic prev_to;
    logic [DATA_W-1:0] reg_before;
    reg_before = model_reg;
    prev_to = exp_to;
    if (prst) n_resets++;
    if (prst || activity_in) begin
      since    = 0;
      t_loaded = prst ? longint'(REG_RESET) : longint'(reg_before);
    end else begin
      since++;
    end
    exp_to = (since >= t_loaded);
    if (exp_to && !prev_to) n_timeouts++;
    if (prst) model_reg = REG_RESET;
    else if (psel && penable && pwrite && paddr == REG_ADDR) model_reg = pwdata;
    #1;
    check(interrupt == exp_to && reset == exp_to, "interrupt/reset");
    check(timer_value_out == model_reg, "timer_value_out");
  end

  initial begin
    model_reg = REG_RESET; since = 0; t_loaded = longint'(REG_RESET); exp_to = 1'b0;
    prst = 1'b1; psel = 1'b0; penable = 1'b0; pwrite = 1'b0;
    paddr = '0; pwdata = '0; activity_in = 1'b0;
    repeat (2) @(negedge pclk);
    for (int c = 0; c < CYCLES; c++) begin
      @(negedge pclk);
      // APB: a setup phase always moves to its access phase; otherwise
      // start a transfer or idle at random.
      if (psel && !penable) begin
        penable = 1'b1;
      end else if ($urandom_range(0, 2) == 0) begin
        psel    = 1'b1;
        penable = 1'b0;
        pwrite  = $urandom_range(0, 1) == 1;
        paddr   = ($urandom_range(0, 1) == 1) ? REG_ADDR : ADDR_W'($urandom());
        // Small timeouts so that the watchdog fires often.
        pwdata  = ($urandom_range(0, 7) == 0) ? DATA_W'($urandom())
                                               : DATA_W'($urandom_range(0, 40));
      end else begin
        psel    = 1'b0;
        penable = 1'b0;
        pwrite  = $urandom_range(0, 1) == 1;
        paddr   = ADDR_W'($urandom());
        pwdata  = DATA_W'($urandom());
      end
      activity_in = ($urandom_range(0, 24) == 0);
      prst = ($urandom_range(0, 999) == 0) && !(psel && !penable);
      if (prst) begin psel = 1'b0; penable = 1'b0; end
    end
    check(n_writes > 0 && n_reads > 0 && n_errors > 0, "APB writes, reads and errors seen");
    check(n_timeouts > 0, "timeouts seen");
    check(n_resets > 0, "resets seen");
    $display("random: writes=%0d reads=%0d errors=%0d timeouts=%0d reset cycles=%0d",
             n_writes, n_reads, n_errors, n_timeouts, n_resets);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
