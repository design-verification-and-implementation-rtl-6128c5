// wdog_pkg: constants shared by the watchdog blocks.
//
// The counter width (32 bits) and the unlock key 0x1ACCE551 are the ones the
// watchdog is specified with. The register offsets are this design's choice:
// they follow the usual layout of AMBA watchdog peripherals (load register at
// offset 0x000, lock register at offset 0xC00), addressed as 32-bit words.
package wdog_pkg;

  // Width of the down counter, of WDOGLOAD and of the write data bus.
  localparam int unsigned WDOG_WIDTH = 32;

  // Value that, written to WDOGLOCK, opens write access to the registers.
  localparam logic [31:0] WDOG_UNLOCK_KEY = 32'h1ACC_E551;

  // Word address of a register: byte offset bits [11:2].
  typedef logic [11:2] wdog_addr_t;

  localparam wdog_addr_t WDOG_ADDR_LOAD = wdog_addr_t'(12'h000 >> 2);
  localparam wdog_addr_t WDOG_ADDR_LOCK = wdog_addr_t'(12'hC00 >> 2);

endpackage
