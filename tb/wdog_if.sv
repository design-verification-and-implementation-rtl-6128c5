// wdog_if: signal bundle between the watchdog and a class-based test
// environment. The clock is generated outside and passed in; every other
// signal of the watchdog's port list is carried here so that drivers and
// monitors can reach the device through one virtual interface.
interface wdog_if (input logic WDOGCLK);
  import wdog_pkg::*;

  logic                  PRESETn;
  logic                  PSEL;
  logic                  PENABLE;
  logic                  PWRITE;
  wdog_addr_t            PADDR;
  logic [WDOG_WIDTH-1:0] PWDATA;
  logic                  WDOGCLKEN;
  logic                  WDOGINTEN;
  logic                  WDOGINT;
  logic                  WDOGRES;
  logic [WDOG_WIDTH-1:0] WDOGCOUNT;
endinterface
