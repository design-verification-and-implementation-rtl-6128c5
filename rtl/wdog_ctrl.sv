// wdog_ctrl: the watchdog's control flow, interrupt and reset generation.
//
// On every rising edge where the timer is enabled (`clken`, WDOGCLKEN):
//   - if a reload is wanted, the counter is loaded from WDOGLOAD;
//   - else if the count is zero and no interrupt is pending, WDOGINT is
//     raised and the counter is reloaded: the next full count is the time
//     the system has to service the interrupt;
//   - else if the count is zero and the interrupt is still pending, the
//     service time has run out: WDOGRES is pulsed high for one cycle, the
//     interrupt is dropped and the counter reloads, so the watchdog starts
//     over once the system restarts;
//   - else the counter decrements.
// A reload is wanted after an accepted WDOGLOAD write (`reload_req`) and when
// the system services the interrupt (`intclr`, WDOGINTEN). WDOGINTEN clears
// WDOGINT on the next edge whatever `clken` is; reload requests that arrive
// while the timer is disabled are held and carried out on the first enabled
// edge, so a disabled timer never moves its count.
//
// Timing: with load value L, WDOGINT rises L+1 enabled cycles after the
// counter was loaded, and WDOGRES follows L+1 enabled cycles after that
// unless WDOGINTEN came in between. Both outputs are registered.
//
// Follows the specification: interrupt at zero, clearing by WDOGINTEN with a
// reload, reset at the second zero, restart from the load value, nothing
// moving while WDOGCLKEN is low. This design's choices: the one-cycle reset
// pulse, holding requests made while disabled, and a reload having priority
// over the zero check when both fall on the same edge.
module wdog_ctrl (
  input  logic clk,
  input  logic rst_n,
  input  logic clken,
  input  logic intclr,
  input  logic reload_req,
  input  logic zero,
  output logic cnt_load,
  output logic cnt_dec,
  output logic wdogint,
  output logic wdogres
);

  logic pending_q;
  logic reload_now;
  logic expire;

  assign reload_now = clken && (pending_q || reload_req || intclr);
  assign expire     = clken && !reload_now && zero;
  assign cnt_load   = reload_now || expire;
  assign cnt_dec    = clken && !cnt_load;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pending_q <= 1'b0;
      wdogint   <= 1'b0;
      wdogres   <= 1'b0;
    end else begin
      if (clken)                          pending_q <= 1'b0;
      else if (reload_req || intclr)      pending_q <= 1'b1;

      if (intclr)                         wdogint   <= 1'b0;
      else if (expire)                    wdogint   <= !wdogint;

      wdogres <= expire && wdogint;
    end
  end

  // The reset only ever follows an interrupt that was not serviced, and the
  // two outputs are never high together.
  a_res_after_int: assert property (@(posedge clk) disable iff (!rst_n)
    $rose(wdogres) |-> $past(wdogint));
  a_int_res_exclusive: assert property (@(posedge clk) disable iff (!rst_n)
    !(wdogint && wdogres));

endmodule
