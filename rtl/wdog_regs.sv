// wdog_regs: the watchdog's bus-side registers, WDOGLOAD and WDOGLOCK.
//
// A write-only AMBA APB slave. A write happens in the access phase of an APB
// transfer (PSEL, PENABLE and PWRITE high); transfers take one access cycle,
// so no PREADY is needed. Two registers are decoded:
//   WDOGLOCK (offset 0xC00): writing 0x1ACCE551 opens write access to the
//     other registers, writing any other value closes it. It is write-only
//     and is always writable. After reset access is closed.
//   WDOGLOAD (offset 0x000): the counter's reload value. A write is accepted
//     only while access is open and is otherwise ignored. An accepted write
//     also asks the controller to reload the counter (`reload_req`, a one
//     cycle pulse on the edge where `load_value` takes the new value).
// Writes to other offsets are ignored.
//
// Follows the specification: the lock key and its open/close rule, and an
// accepted load write restarting the count from the new value. This design's
// choices: the APB handshake and the register offsets, access closed after
// reset, and the load register's reset value of all ones.
module wdog_regs
  import wdog_pkg::*;
#(
  parameter int unsigned  W           = WDOG_WIDTH,
  parameter logic [W-1:0] LOAD_RESET  = '1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         psel,
  input  logic         penable,
  input  logic         pwrite,
  input  wdog_addr_t   paddr,
  input  logic [W-1:0] pwdata,
  output logic [W-1:0] load_value,
  output logic         reload_req,
  output logic         unlocked
);

  logic wr_access;
  logic wr_lock;
  logic wr_load;

  assign wr_access = psel && penable && pwrite;
  assign wr_lock   = wr_access && (paddr == WDOG_ADDR_LOCK);
  assign wr_load   = wr_access && (paddr == WDOG_ADDR_LOAD) && unlocked;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      unlocked   <= 1'b0;
      load_value <= LOAD_RESET;
      reload_req <= 1'b0;
    end else begin
      reload_req <= wr_load;
      if (wr_lock)
        unlocked <= (32'(pwdata) == WDOG_UNLOCK_KEY);
      if (wr_load)
        load_value <= pwdata;
    end
  end

  // APB rule: the access phase is only entered with the slave selected.
  a_penable_needs_psel: assert property (@(posedge clk) disable iff (!rst_n)
    penable |-> psel);

endmodule
