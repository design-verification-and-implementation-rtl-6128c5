// tb_watchdog: end-to-end test of the watchdog at its default size.
//
// Plays a processor on the APB write port and on the service line:
//   1. after reset access is closed, and a WDOGLOAD write is ignored;
//   2. with WDOGCLKEN low the timer is disabled: even after unlocking with
//      0x1ACCE551 and writing WDOGLOAD = 0x0A, WDOGCOUNT does not move;
//   3. enabling the timer loads 10 and counts down; WDOGINT rises 11 cycles
//      after the load, and the count restarts from 10 (the service time);
//   4. WDOGINTEN inside the service time clears WDOGINT, reloads the count,
//      and no WDOGRES follows;
//   5. the next interrupt is left unserviced: WDOGRES pulses for one cycle
//      11 cycles after it, and the count restarts from 10;
//   6. an accepted WDOGLOAD write restarts the count from the new value;
//      writing another value to WDOGLOCK closes access again;
//   7. a random phase drives bus writes, the enable and the service line and
//      compares all outputs every cycle with a cycle model of the watchdog.
// Every mechanism (rejected locked write, unlock, accepted load, relock,
// disabled-timer stall, interrupt, serviced interrupt, watchdog reset) is
// counted, and one that never happened is a failure.
module tb_watchdog;
  import wdog_pkg::*;

  localparam int unsigned W = WDOG_WIDTH;

  logic         WDOGCLK = 1'b0;
  logic         PRESETn = 1'b0;
  logic         PSEL = 1'b0;
  logic         PENABLE = 1'b0;
  logic         PWRITE = 1'b0;
  wdog_addr_t   PADDR = '0;
  logic [W-1:0] PWDATA = '0;
  logic         WDOGCLKEN = 1'b0;
  logic         WDOGINTEN = 1'b0;
  logic         WDOGINT;
  logic         WDOGRES;
  logic [W-1:0] WDOGCOUNT;

  watchdog dut (.*);

  always #5 WDOGCLK = ~WDOGCLK;

  int checks = 0;
  int failures = 0;

  // Mechanism counters.
  int n_locked_reject = 0, n_unlock = 0, n_load = 0, n_relock = 0;
  int n_stall = 0, n_int = 0, n_serviced = 0, n_reset = 0;

  task automatic expect_eq(input string what, input logic [W-1:0] got, input logic [W-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d (%h) expected %0d (%h) at %0t", what, got, got, exp, exp, $time);
    end
  endtask

  // APB write: setup phase, access phase, idle.
  task automatic apb_write(input wdog_addr_t a, input logic [W-1:0] d);
    PSEL = 1'b1; PENABLE = 1'b0; PWRITE = 1'b1; PADDR = a; PWDATA = d;
    @(negedge WDOGCLK);
    PENABLE = 1'b1;
    @(negedge WDOGCLK);
    PSEL = 1'b0; PENABLE = 1'b0; PWRITE = 1'b0;
  endtask

  // ---------------------------------------------------------------------
  // Cycle model, updated at every rising edge from the inputs the
  // testbench set up at the preceding falling edge.
  logic         m_unlocked, m_reload, m_pending, m_int, m_res;
  logic [W-1:0] m_load, m_count;
  bit           model_on = 1'b0;

  always @(posedge WDOGCLK) if (model_on) begin
    logic wr, want_reload;
    wr = PSEL && PENABLE && PWRITE;
    want_reload = m_pending || m_reload || WDOGINTEN;
    m_res = 1'b0;
    if (WDOGCLKEN) begin
      m_pending = 1'b0;
      if (want_reload) m_count = m_load;
      else if (m_count == 0) begin
        m_count = m_load;
        if (m_int) begin m_res = 1'b1; m_int = 1'b0; end
        else m_int = 1'b1;
      end else m_count = m_count - 1;
    end else if (m_reload || WDOGINTEN) m_pending = 1'b1;
    if (WDOGINTEN) m_int = 1'b0;
    m_reload = 1'b0;
    if (wr && PADDR == WDOG_ADDR_LOCK) m_unlocked = (PWDATA == WDOG_UNLOCK_KEY);
    else if (wr && PADDR == WDOG_ADDR_LOAD && m_unlocked) begin
      m_load = PWDATA; m_reload = 1'b1;
    end
  end

  // Mechanism tally, from the device's own outputs.
  logic int_d = 1'b0;
  always @(posedge WDOGCLK) begin
    if (WDOGRES) n_reset++;
    if (WDOGINT && !int_d) n_int++;
    if (int_d && WDOGINTEN) n_serviced++;
    int_d <= WDOGINT;
  end

  int n;
  logic [W-1:0] c;

  initial begin
    repeat (2) @(negedge WDOGCLK);
    PRESETn = 1'b1;
    @(negedge WDOGCLK);
    expect_eq("count after reset", WDOGCOUNT, '1);
    expect_eq("int after reset", W'(WDOGINT), 0);
    expect_eq("res after reset", W'(WDOGRES), 0);

    // 1. Locked: load write ignored (timer disabled, so count must stay).
    apb_write(WDOG_ADDR_LOAD, 32'h0A);
    repeat (2) @(negedge WDOGCLK);
    WDOGCLKEN = 1'b1;
    @(negedge WDOGCLK);
    expect_eq("locked write ignored", WDOGCOUNT, 32'hFFFF_FFFE);
    if (WDOGCOUNT == 32'hFFFF_FFFE) n_locked_reject++;
    WDOGCLKEN = 1'b0;

    // 2. Unlock and write 10 while disabled: nothing moves.
    apb_write(WDOG_ADDR_LOCK, WDOG_UNLOCK_KEY);
    n_unlock++;
    apb_write(WDOG_ADDR_LOAD, 32'h0A);
    n_load++;
    c = WDOGCOUNT;
    for (int i = 0; i < 5; i++) begin
      @(negedge WDOGCLK);
      expect_eq("disabled count frozen", WDOGCOUNT, c);
      n_stall++;
    end

    // 3. Enable: count loads 10 and runs down; interrupt 11 cycles later.
    WDOGCLKEN = 1'b1;
    @(negedge WDOGCLK);
    expect_eq("load on enable", WDOGCOUNT, 32'd10);
    for (int v = 9; v >= 0; v--) begin
      @(negedge WDOGCLK);
      expect_eq("count down", WDOGCOUNT, W'(v));
      expect_eq("no int before zero", W'(WDOGINT), 0);
    end
    @(negedge WDOGCLK);
    expect_eq("interrupt at zero", W'(WDOGINT), 1);
    expect_eq("service time starts from load", WDOGCOUNT, 32'd10);

    // 4. Service it when the count shows 4.
    while (WDOGCOUNT != 4) @(negedge WDOGCLK);
    WDOGINTEN = 1'b1;
    @(negedge WDOGCLK);
    WDOGINTEN = 1'b0;
    expect_eq("int cleared", W'(WDOGINT), 0);
    expect_eq("count reloaded by service", WDOGCOUNT, 32'd10);
    n = 0;
    while (!WDOGINT && n < 50) begin
      @(negedge WDOGCLK); n++;
      expect_eq("no reset after service", W'(WDOGRES), 0);
    end
    expect_eq("next interrupt", n, 11);

    // 5. Leave it unserviced: reset 11 cycles later.
    n = 0;
    while (!WDOGRES && n < 50) begin @(negedge WDOGCLK); n++; end
    expect_eq("reset after service time", n, 11);
    expect_eq("int dropped at reset", W'(WDOGINT), 0);
    expect_eq("count restarts at reset", WDOGCOUNT, 32'd10);
    @(negedge WDOGCLK);
    expect_eq("reset pulse one cycle", W'(WDOGRES), 0);

    // 6. New load value while unlocked restarts the count; relock.
    apb_write(WDOG_ADDR_LOAD, 32'd25);
    n_load++;
    @(negedge WDOGCLK);
    expect_eq("restart from new load", WDOGCOUNT, 32'd25);
    apb_write(WDOG_ADDR_LOCK, 32'h0);
    n_relock++;
    apb_write(WDOG_ADDR_LOAD, 32'd3);
    repeat (2) @(negedge WDOGCLK);
    expect_eq("relocked write ignored", WDOGCOUNT, 32'd25 - 6);
    if (WDOGCOUNT == 32'd19) n_locked_reject++;

    // 7. Random phase against the cycle model.
    @(negedge WDOGCLK);
    m_unlocked = 1'b0; m_reload = 1'b0; m_pending = 1'b0;
    m_int = WDOGINT; m_res = WDOGRES; m_load = 32'd25; m_count = WDOGCOUNT;
    model_on = 1'b1;
    for (int i = 0; i < 20000; i++) begin
      int r;
      WDOGCLKEN = ($urandom_range(0, 7) != 0);
      WDOGINTEN = WDOGINT ? ($urandom_range(0, 15) == 0) : ($urandom_range(0, 99) == 0);
      if (!WDOGCLKEN) n_stall++;
      r = $urandom_range(0, 199);
      if (PSEL && !PENABLE) PENABLE = 1'b1;
      else if (PSEL) begin PSEL = 1'b0; PENABLE = 1'b0; PWRITE = 1'b0; end
      else if (r < 4) begin
        PSEL = 1'b1; PWRITE = 1'b1;
        PADDR = (r < 2) ? WDOG_ADDR_LOAD : WDOG_ADDR_LOCK;
        PWDATA = (r < 2) ? 32'($urandom_range(0, 40))
               : (($urandom_range(0, 2) != 0) ? WDOG_UNLOCK_KEY : $urandom);
        if (r >= 2) begin
          if (PWDATA == WDOG_UNLOCK_KEY) n_unlock++; else n_relock++;
        end else if (m_unlocked) n_load++;
        else n_locked_reject++;
      end
      @(negedge WDOGCLK);
      expect_eq("rand count", WDOGCOUNT, m_count);
      expect_eq("rand int", W'(WDOGINT), W'(m_int));
      expect_eq("rand res", W'(WDOGRES), W'(m_res));
    end
    model_on = 1'b0;

    $display("mechanisms: locked_reject=%0d unlock=%0d load=%0d relock=%0d stall=%0d interrupt=%0d serviced=%0d reset=%0d",
             n_locked_reject, n_unlock, n_load, n_relock, n_stall, n_int, n_serviced, n_reset);
    checks++;
    if (n_locked_reject == 0 || n_unlock == 0 || n_load == 0 || n_relock == 0 ||
        n_stall == 0 || n_int == 0 || n_serviced == 0 || n_reset == 0) begin
      failures++;
      $display("FAIL: a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge WDOGCLK);
    failures++;
    $display("FAIL: watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
