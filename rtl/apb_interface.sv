// apb_interface: APB slave that holds the watchdog's timer_value register.
//
// The slave has a single 32-bit read/write register, timer_value, at byte
// address TIMER_ADDR (0x10). Its value goes straight to the watchdog timer
// as the timeout, in pclk cycles. A write is taken when PSEL, PENABLE and
// PWRITE are all high, a read when PSEL and PENABLE are high and PWRITE is
// low, and only when PADDR matches the register's address; this is the
// behaviour of the reference design.
//
// Choices of this design where the reference is silent:
//   * zero wait states: PREADY is high in every access phase
//     (PSEL & PENABLE), so each transfer takes the APB minimum of two cycles;
//   * a transfer to any other address completes with PSLVERR high, a write
//     there changes nothing and a read there returns zero;
//   * PRDATA is zero outside a read access phase;
//   * prst is active high and synchronous to pclk; it puts TIMER_RESET
//     (0x1E, as seen after reset in the reference waveforms) in the register.
//
// Interface: APB3-style slave (no PPROT/PSTRB), plus the timer_value output.
// Timing: the register is updated at the pclk edge that ends the write's
// access phase; timer_value shows the new value from then on. PRDATA,
// PREADY and PSLVERR are combinational from the APB inputs and the register.
module apb_interface
#(
  parameter int unsigned       ADDR_W      = wdt_apb_pkg::APB_ADDR_W,
  parameter int unsigned       DATA_W      = wdt_apb_pkg::APB_DATA_W,
  parameter logic [ADDR_W-1:0] TIMER_ADDR  = wdt_apb_pkg::WDT_TIMER_ADDR,
  parameter logic [DATA_W-1:0] TIMER_RESET = wdt_apb_pkg::WDT_TIMER_RESET
) (
  input  logic              pclk,
  input  logic              prst,
  input  logic              psel,
  input  logic              penable,
  input  logic              pwrite,
  input  logic [ADDR_W-1:0] paddr,
  input  logic [DATA_W-1:0] pwdata,
  output logic [DATA_W-1:0] prdata,
  output logic              pready,
  output logic              pslverr,
  output logic [DATA_W-1:0] timer_value
);

  logic access;   // access phase of a transfer
  logic hit;      // the transfer addresses the timer_value register

  assign access = psel & penable;
  assign hit    = (paddr == TIMER_ADDR);

  always_ff @(posedge pclk) begin
    if (prst)
      timer_value <= TIMER_RESET;
    else if (access && pwrite && hit)
      timer_value <= pwdata;
  end

  always_comb begin
    pready  = access;
    pslverr = access & ~hit;
    prdata  = (access && !pwrite && hit) ? timer_value : '0;
  end

  // APB protocol rules the master must keep.
  // PENABLE is only driven together with PSEL.
  a_enable_needs_sel : assert property (@(posedge pclk) disable iff (prst)
    penable |-> psel);
  // The setup phase (PSEL without PENABLE) is followed by the access phase.
  a_setup_then_access : assert property (@(posedge pclk) disable iff (prst)
    (psel && !penable) |=> (psel && penable));
  // Address, direction and write data hold from setup into access.
  a_stable_in_access : assert property (@(posedge pclk) disable iff (prst)
    (psel && !penable) |=> ($stable(paddr) && $stable(pwrite) && $stable(pwdata)));

endmodule
