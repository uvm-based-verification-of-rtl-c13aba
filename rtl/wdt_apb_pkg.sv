// wdt_apb_pkg: constants shared by the watchdog timer with APB interface.
//
// The bus widths follow the waveforms of the reference design: an 8-bit
// APB address and 32-bit read data, write data and timer value. The address
// of the timer_value register (0x10) and its reset value (0x1E = 30 pclk
// cycles) are read off those same waveforms; the register map itself (one
// register, everything else answering with PSLVERR) is this design's choice.
package wdt_apb_pkg;

  localparam int unsigned APB_ADDR_W = 8;
  localparam int unsigned APB_DATA_W = 32;

  localparam logic [APB_ADDR_W-1:0] WDT_TIMER_ADDR  = 8'h10;
  localparam logic [APB_DATA_W-1:0] WDT_TIMER_RESET = 32'h0000_001E;

endpackage
