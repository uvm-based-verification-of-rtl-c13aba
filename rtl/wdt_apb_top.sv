// wdt_apb_top: watchdog timer with an APB configuration interface.
//
// The top holds two blocks. The APB interface is a slave on the peripheral
// bus holding the timer_value register (address 0x10, 30 cycles after
// reset). The watchdog timer counts that many pclk cycles after each
// activity_in pulse from the supervised system and, if no new activity_in
// arrives in time, asserts interrupt and reset. Both blocks run on pclk and
// are reset by prst (active high, synchronous). This split and the single
// timer_value connection follow the reference design's block diagram.
//
// Ports: the APB slave signals (psel, penable, pwrite, paddr, pwdata,
// prdata, pready, pslverr), activity_in, interrupt and reset. timer_value_out
// and count bring out the configured timeout and the running counter, which
// the reference design's waveforms show; they are for observation only.
module wdt_apb_top
#(
  parameter int unsigned ADDR_W = wdt_apb_pkg::APB_ADDR_W,
  parameter int unsigned DATA_W = wdt_apb_pkg::APB_DATA_W
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
  input  logic              activity_in,
  output logic              interrupt,
  output logic              reset,
  output logic [DATA_W-1:0] timer_value_out,
  output logic [DATA_W-1:0] count
);

  logic [DATA_W-1:0] timer_value;

  apb_interface #(
    .ADDR_W      (ADDR_W),
    .DATA_W      (DATA_W),
    .TIMER_ADDR  (ADDR_W'(wdt_apb_pkg::WDT_TIMER_ADDR)),
    .TIMER_RESET (DATA_W'(wdt_apb_pkg::WDT_TIMER_RESET))
  ) u_apb (
    .pclk, .prst, .psel, .penable, .pwrite, .paddr, .pwdata,
    .prdata, .pready, .pslverr, .timer_value
  );

  watchdog_timer #(
    .DATA_W      (DATA_W),
    .RESET_COUNT (DATA_W'(wdt_apb_pkg::WDT_TIMER_RESET))
  ) u_wdt (
    .pclk, .prst, .timer_value, .activity_in, .interrupt, .reset, .count
  );

  assign timer_value_out = timer_value;

endmodule
