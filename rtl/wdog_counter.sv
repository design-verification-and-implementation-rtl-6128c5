// wdog_counter: the watchdog's down counter (WDOGCOUNT).
//
// A W-bit register that loads `load_value` when `load` is high and otherwise
// decrements by one on each rising clock edge where `dec` is high. A load wins
// over a decrement. `zero` is high, combinationally, while the count is zero.
// The decrement wraps from zero to all ones, but the controller never asks
// for it: at zero it reloads instead.
//
// Timing: `count` changes on the clock edge after `load` or `dec` is seen.
// Reset (asynchronous, active low) sets the count to RESET_VALUE, the reset
// value of the load register, so that a watchdog left alone after reset
// times out after the longest period. The 32-bit width follows the
// specification; the reset value is this design's choice.
module wdog_counter #(
  parameter int unsigned    W           = 32,
  parameter logic [W-1:0]   RESET_VALUE = '1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic         dec,
  input  logic [W-1:0] load_value,
  output logic [W-1:0] count,
  output logic         zero
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      count <= RESET_VALUE;
    else if (load)   count <= load_value;
    else if (dec)    count <= count - W'(1);
  end

  assign zero = (count == '0);

endmodule
