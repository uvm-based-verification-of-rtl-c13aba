// tb_apb_interface: self-checking test of the APB slave with the
// timer_value register.
//
// An APB master (apb_if) issues directed and random writes and reads. A
// reference model of the register map (one register at 0x10, reset value
// 0x1E; every other address answers with PSLVERR, ignores writes and reads
// as zero) predicts PRDATA, PSLVERR and the timer_value output. Each
// transfer must complete in two cycles (setup plus one access cycle, no
// wait states), and PREADY, PSLVERR and PRDATA must be low or zero while
// the bus is idle or in its setup phase.
module tb_apb_interface;

  localparam int unsigned ADDR_W = 8;
  localparam int unsigned DATA_W = 32;
  localparam logic [ADDR_W-1:0] REG_ADDR  = 8'h10;
  localparam logic [DATA_W-1:0] REG_RESET = 32'h0000_001E;
  localparam int unsigned MAX_CYCLES = 20000;

  logic pclk = 1'b0;
  logic prst;
  logic [DATA_W-1:0] timer_value;

  int checks   = 0;
  int failures = 0;
  int n_writes = 0, n_reads = 0, n_errors = 0;

  logic [DATA_W-1:0] model_reg;

  apb_if #(.ADDR_W(ADDR_W), .DATA_W(DATA_W)) bus (.pclk);

  apb_interface dut (
    .pclk, .prst,
    .psel(bus.psel), .penable(bus.penable), .pwrite(bus.pwrite),
    .paddr(bus.paddr), .pwdata(bus.pwdata), .prdata(bus.prdata),
    .pready(bus.pready), .pslverr(bus.pslverr), .timer_value
  );

  always #5 pclk = ~pclk;

  initial begin
    repeat (MAX_CYCLES) @(posedge pclk);
    failures++;
    $display("apb: simulation did not finish in %0d cycles", MAX_CYCLES);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("apb check failed at %0t: %s", $time, what);
    end
  endtask

  // Outside an access phase the slave must not respond.
  always @(posedge pclk) begin
    if (!prst && !(bus.psel && bus.penable)) begin
      check(!bus.pready && !bus.pslverr && bus.prdata == '0, "response outside access phase");
    end
  end

  task automatic do_write(input logic [ADDR_W-1:0] a, input logic [DATA_W-1:0] d);
    logic err;
    bus.write(a, d, err);
    n_writes++;
    if (a == REG_ADDR) model_reg = d;
    else n_errors++;
    check(err == (a != REG_ADDR), $sformatf("write 0x%02h pslverr=%b", a, err));
    check(bus.last_cycles == 2, $sformatf("write took %0d cycles", bus.last_cycles));
    check(timer_value == model_reg,
          $sformatf("timer_value 0x%08h expected 0x%08h", timer_value, model_reg));
  endtask

  task automatic do_read(input logic [ADDR_W-1:0] a);
    logic err;
    logic [DATA_W-1:0] d;
    bus.read(a, d, err);
    n_reads++;
    if (a != REG_ADDR) n_errors++;
    check(err == (a != REG_ADDR), $sformatf("read 0x%02h pslverr=%b", a, err));
    check(d == ((a == REG_ADDR) ? model_reg : '0),
          $sformatf("read 0x%02h gave 0x%08h, expected 0x%08h", a, d,
                    (a == REG_ADDR) ? model_reg : '0));
    check(bus.last_cycles == 2, $sformatf("read took %0d cycles", bus.last_cycles));
  endtask

  function automatic logic [ADDR_W-1:0] rand_addr();
    // Mostly the four word addresses 0x00..0x10 seen in use, sometimes any byte.
    case ($urandom_range(0, 3))
      0, 1:    return REG_ADDR;
      2:       return ADDR_W'($urandom_range(0, 4) * 4);
      default: return ADDR_W'($urandom());
    endcase
  endfunction

  initial begin
    bus.idle();
    prst = 1'b1;
    model_reg = REG_RESET;
    repeat (3) @(negedge pclk);
    prst = 1'b0;
    check(timer_value == REG_RESET, "reset value");
    // Directed: read reset value, write, read back, unmapped accesses.
    do_read(REG_ADDR);
    do_write(REG_ADDR, 32'h0000_0014);
    do_read(REG_ADDR);
    do_write(8'h00, 32'hDEAD_BEEF);
    do_write(8'h04, 32'h1234_5678);
    do_write(8'h08, 32'hFFFF_FFFF);
    do_read(8'h00);
    do_read(8'h11);
    do_read(REG_ADDR);
    // Random mix of writes and reads.
    repeat (500) begin
      if ($urandom_range(0, 1) == 1) do_write(rand_addr(), DATA_W'($urandom()));
      else do_read(rand_addr());
      repeat ($urandom_range(0, 2)) @(negedge pclk);
    end
    // Reset restores the register.
    @(negedge pclk) prst = 1'b1;
    @(negedge pclk) prst = 1'b0;
    model_reg = REG_RESET;
    do_read(REG_ADDR);
    check(n_writes > 0 && n_reads > 0 && n_errors > 0, "every transfer kind seen");
    $display("apb: writes=%0d reads=%0d error responses=%0d", n_writes, n_reads, n_errors);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
