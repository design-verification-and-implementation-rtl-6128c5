// watchdog: a bus-programmable watchdog timer for a drone SoC.
//
// The processor programs a reload value into WDOGLOAD over an APB write port
// and must then service the watchdog regularly. A 32-bit down counter
// (WDOGCOUNT) runs from that value to zero, one step per WDOGCLK edge while
// WDOGCLKEN is high. At zero the watchdog raises WDOGINT and restarts the
// count; the next full count is the service time. Pulsing WDOGINTEN clears
// the interrupt and restarts the count. If the count reaches zero again with
// the interrupt still pending, WDOGRES is pulsed high for one cycle to reset
// the system and the watchdog starts over. WDOGLOAD can only be written after
// 0x1ACCE551 has been written to WDOGLOCK; any other value written there
// closes access again, so runaway software cannot reprogram the watchdog.
//
// Bus and timer share the one clock WDOGCLK; PRESETn is an asynchronous,
// active-low reset. See wdog_regs for the register map and wdog_ctrl for the
// cycle-level timing. The behaviour above follows the specification; the APB
// write port, the register offsets, the reset values and the reset pulse
// width are this design's choices.
module watchdog
  import wdog_pkg::*;
#(
  parameter int unsigned  W          = WDOG_WIDTH,
  parameter logic [W-1:0] LOAD_RESET = '1
) (
  input  logic         WDOGCLK,
  input  logic         PRESETn,
  input  logic         PSEL,
  input  logic         PENABLE,
  input  logic         PWRITE,
  input  wdog_addr_t   PADDR,
  input  logic [W-1:0] PWDATA,
  input  logic         WDOGCLKEN,
  input  logic         WDOGINTEN,
  output logic         WDOGINT,
  output logic         WDOGRES,
  output logic [W-1:0] WDOGCOUNT
);

  logic [W-1:0] load_value;
  logic         reload_req;
  logic         unlocked;
  logic         cnt_load;
  logic         cnt_dec;
  logic         zero;

  wdog_regs #(.W(W), .LOAD_RESET(LOAD_RESET)) u_regs (
    .clk        (WDOGCLK),
    .rst_n      (PRESETn),
    .psel       (PSEL),
    .penable    (PENABLE),
    .pwrite     (PWRITE),
    .paddr      (PADDR),
    .pwdata     (PWDATA),
    .load_value (load_value),
    .reload_req (reload_req),
    .unlocked   (unlocked)
  );

  wdog_counter #(.W(W), .RESET_VALUE(LOAD_RESET)) u_counter (
    .clk        (WDOGCLK),
    .rst_n      (PRESETn),
    .load       (cnt_load),
    .dec        (cnt_dec),
    .load_value (load_value),
    .count      (WDOGCOUNT),
    .zero       (zero)
  );

  wdog_ctrl u_ctrl (
    .clk        (WDOGCLK),
    .rst_n      (PRESETn),
    .clken      (WDOGCLKEN),
    .intclr     (WDOGINTEN),
    .reload_req (reload_req),
    .zero       (zero),
    .cnt_load   (cnt_load),
    .cnt_dec    (cnt_dec),
    .wdogint    (WDOGINT),
    .wdogres    (WDOGRES)
  );

endmodule
