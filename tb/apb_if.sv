// apb_if: APB bus bundle with a simple master used by the testbenches.
//
// The master tasks drive one transfer at a time on the falling edge of
// pclk: a setup phase (PSEL high, PENABLE low) followed by an access phase
// (PSEL and PENABLE high) that is held until PREADY is seen on a rising
// edge. The read data and PSLVERR are captured on that same edge. The bus
// returns to idle (PSEL and PENABLE low) after every transfer; an optional
// number of idle cycles can be inserted after it.
interface apb_if #(
  parameter int unsigned ADDR_W = 8,
  parameter int unsigned DATA_W = 32
) (
  input logic pclk
);

  logic              psel;
  logic              penable;
  logic              pwrite;
  logic [ADDR_W-1:0] paddr;
  logic [DATA_W-1:0] pwdata;
  logic [DATA_W-1:0] prdata;
  logic              pready;
  logic              pslverr;

  // Cycles from the setup phase to the end of the last transfer.
  int unsigned last_cycles;

  task automatic idle();
    psel    = 1'b0;
    penable = 1'b0;
    pwrite  = 1'b0;
    paddr   = '0;
    pwdata  = '0;
  endtask

  task automatic transfer(input logic wr, input logic [ADDR_W-1:0] addr,
                          input logic [DATA_W-1:0] wdata,
                          output logic [DATA_W-1:0] rdata, output logic err);
    @(negedge pclk);
    psel    = 1'b1;
    penable = 1'b0;
    pwrite  = wr;
    paddr   = addr;
    pwdata  = wr ? wdata : DATA_W'($urandom());
    @(negedge pclk);
    penable = 1'b1;
    last_cycles = 1;
    forever begin
      @(posedge pclk);
      last_cycles++;
      if (pready) break;
    end
    rdata = prdata;
    err   = pslverr;
    @(negedge pclk);
    idle();
  endtask

  task automatic write(input logic [ADDR_W-1:0] addr, input logic [DATA_W-1:0] wdata,
                       output logic err);
    logic [DATA_W-1:0] unused;
    transfer(1'b1, addr, wdata, unused, err);
  endtask

  task automatic read(input logic [ADDR_W-1:0] addr, output logic [DATA_W-1:0] rdata,
                      output logic err);
    transfer(1'b0, addr, '0, rdata, err);
  endtask

endinterface
