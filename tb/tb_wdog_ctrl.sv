// tb_wdog_ctrl: self-checking test of the watchdog controller.
//
// The testbench keeps the down counter itself: it applies the controller's
// `cnt_load` / `cnt_dec` to a count with a fixed load value L and feeds back
// `zero`. Directed cases check the timing worked out by hand: WDOGINT rises
// L+1 enabled cycles after a reload, WDOGRES pulses for one cycle L+1 cycles
// later if nothing services the interrupt, WDOGINTEN inside the service time
// prevents the reset, and a low clock enable freezes everything while
// keeping a reload request for later. A random phase then compares every
// output on every cycle with a flowchart model of the controller.
module tb_wdog_ctrl;

  localparam int unsigned L = 6;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic clken = 1'b0;
  logic intclr = 1'b0;
  logic reload_req = 1'b0;
  logic zero;
  logic cnt_load;
  logic cnt_dec;
  logic wdogint;
  logic wdogres;

  int checks = 0;
  int failures = 0;
  int unsigned count;

  wdog_ctrl dut (.*);

  always #5 clk = ~clk;

  assign zero = (count == 0);

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n)        count <= 3;
    else if (cnt_load) count <= L;
    else if (cnt_dec)  count <= count - 1;
  end

  task automatic expect_eq(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d (t=%0t)", what, got, exp, $time);
    end
  endtask

  // Cycles (negedges) until `wdogint` is high, at most `limit`.
  task automatic cycles_to_int(output int n, input int limit);
    n = 0;
    while (!wdogint && n < limit) begin @(negedge clk); n++; end
  endtask

  // Reference model state.
  logic m_pending, m_int, m_res;
  int   n;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    expect_eq("int after reset", wdogint, 0);
    expect_eq("res after reset", wdogres, 0);

    // Disabled: a reload request is held, the count does not move.
    reload_req = 1'b1;
    @(negedge clk);
    reload_req = 1'b0;
    repeat (4) @(negedge clk);
    expect_eq("frozen count", count, 3);
    expect_eq("frozen int", wdogint, 0);

    // Enable: the held reload happens on the first enabled edge.
    clken = 1'b1;
    @(negedge clk);
    expect_eq("held reload done", count, L);

    // Interrupt L+1 cycles after the reload.
    cycles_to_int(n, 100);
    expect_eq("cycles to interrupt", n, L + 1);
    expect_eq("count reloaded at interrupt", count, L);

    // Unserviced: reset exactly L+1 cycles later, one cycle wide.
    n = 0;
    while (!wdogres && n < 100) begin
      @(negedge clk); n++;
      if (!wdogres) expect_eq("int held in service time", wdogint, 1);
    end
    expect_eq("cycles to reset", n, L + 1);
    expect_eq("int dropped at reset", wdogint, 0);
    expect_eq("count reloaded at reset", count, L);
    @(negedge clk);
    expect_eq("reset pulse one cycle", wdogres, 0);

    // Next interrupt, then service it half-way into the service time.
    cycles_to_int(n, 100);
    expect_eq("second interrupt", n, L);
    repeat (L / 2) @(negedge clk);
    intclr = 1'b1;
    @(negedge clk);
    intclr = 1'b0;
    expect_eq("int cleared", wdogint, 0);
    expect_eq("count reloaded by service", count, L);
    // No reset at all before the following interrupt.
    n = 0;
    while (!wdogint && n < 100) begin
      @(negedge clk); n++;
      expect_eq("no reset after service", wdogres, 0);
    end
    expect_eq("interrupt after service", n, L + 1);

    // Service while disabled: int clears at once, reload waits for clken.
    clken = 1'b0;
    intclr = 1'b1;
    @(negedge clk);
    intclr = 1'b0;
    expect_eq("cleared while disabled", wdogint, 0);
    n = count;
    count = 2;
    repeat (3) @(negedge clk);
    expect_eq("disabled count frozen", count, 2);
    clken = 1'b1;
    @(negedge clk);
    expect_eq("reload after enable", count, L);

    // Random phase against a flowchart model.
    // The last edge was enabled, so no reload is pending.
    m_pending = 1'b0; m_int = wdogint; m_res = wdogres;
    for (int i = 0; i < 5000; i++) begin
      logic exp_load, exp_dec;
      clken      = ($urandom_range(0, 4) != 0);
      intclr     = ($urandom_range(0, 12) == 0);
      reload_req = ($urandom_range(0, 25) == 0);
      #1;
      // Flowchart: reload first, then zero check, else count down.
      exp_load = 1'b0; exp_dec = 1'b0;
      if (clken) begin
        if (m_pending || reload_req || intclr) exp_load = 1'b1;
        else if (zero) exp_load = 1'b1;
        else exp_dec = 1'b1;
      end
      expect_eq("rand cnt_load", cnt_load, exp_load);
      expect_eq("rand cnt_dec", cnt_dec, exp_dec);
      @(posedge clk);
      m_res = 1'b0;
      if (clken && !(m_pending || reload_req || intclr) && zero) begin
        if (m_int) begin m_res = 1'b1; m_int = 1'b0; end
        else m_int = 1'b1;
      end
      if (intclr) m_int = 1'b0;
      m_pending = clken ? 1'b0 : (m_pending || reload_req || intclr);
      @(negedge clk);
      expect_eq("rand int", wdogint, m_int);
      expect_eq("rand res", wdogres, m_res);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
