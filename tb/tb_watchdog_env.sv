// tb_watchdog_env: class-based verification environment for the watchdog.
//
// A generator turns named scenarios into a stream of operations; a driver
// plays each operation on the device's pins through a virtual interface; a
// monitor samples the inputs at every rising clock edge and the outputs just
// after it; a scoreboard predicts every output from the sampled inputs with
// its own cycle model and counts mismatches. The scenarios are those used to
// demonstrate the watchdog:
//   serviced   - unlock with 0x1ACCE551, load 0x0A, wait for the interrupt,
//                service it with WDOGINTEN: no reset;
//   unserviced - same, but never service: WDOGRES follows;
//   disabled   - WDOGCLKEN low: write access open, yet the count does not
//                fetch the new load value;
//   access     - load writes ignored while locked, accepted after the key,
//                ignored again after another value is written to WDOGLOCK;
//   random     - random mix of all operations.
// The scoreboard also counts interrupts, services, resets and stalled
// cycles, and each must have happened at least once.
module tb_watchdog_env;
  import wdog_pkg::*;

  typedef enum logic [2:0] {
    OP_IDLE, OP_WRITE_LOCK, OP_WRITE_LOAD, OP_SERVICE, OP_ENABLE, OP_DISABLE
  } op_e;

  // One operation of the stream; `cycles` idle clocks follow it.
  class wdog_op;
    op_e                   op;
    logic [WDOG_WIDTH-1:0] data;
    int                    cycles;
    function new(op_e o, logic [WDOG_WIDTH-1:0] d = '0, int c = 0);
      op = o; data = d; cycles = c;
    endfunction
  endclass

  // What the monitor saw on one rising edge.
  class wdog_sample;
    logic                  psel, penable, pwrite, clken, inten;
    wdog_addr_t            paddr;
    logic [WDOG_WIDTH-1:0] pwdata;
    logic                  wdogint, wdogres;
    logic [WDOG_WIDTH-1:0] count;
  endclass

  // ---------------------------------------------------------------------
  class generator;
    mailbox #(wdog_op) to_drv;
    function new(mailbox #(wdog_op) m); to_drv = m; endfunction

    task put(op_e o, logic [WDOG_WIDTH-1:0] d = '0, int c = 0);
      wdog_op t = new(o, d, c);
      to_drv.put(t);
    endtask

    task serviced();
      put(OP_WRITE_LOCK, WDOG_UNLOCK_KEY);
      put(OP_WRITE_LOAD, 32'h0A);
      put(OP_ENABLE, '0, 11 + 6);   // interrupt, then 6 cycles of service time
      put(OP_SERVICE, '0, 30);      // serviced in time: no reset
    endtask

    task unserviced();
      put(OP_WRITE_LOAD, 32'h0A);
      put(OP_IDLE, '0, 40);         // interrupt, then reset, then start over
    endtask

    task disabled();
      put(OP_DISABLE);
      put(OP_WRITE_LOAD, 32'h05);
      put(OP_IDLE, '0, 12);
      put(OP_ENABLE, '0, 8);
    endtask

    task access();
      put(OP_WRITE_LOCK, 32'h0000_0000);
      put(OP_WRITE_LOAD, 32'd3, 4);     // ignored
      put(OP_WRITE_LOCK, WDOG_UNLOCK_KEY);
      put(OP_WRITE_LOAD, 32'd25, 4);    // accepted, count restarts at 25
      put(OP_WRITE_LOCK, 32'h1ACC_E550);
      put(OP_WRITE_LOAD, 32'd8, 30);    // ignored again
    endtask

    task random_ops(int n);
      for (int i = 0; i < n; i++) begin
        int r = $urandom_range(0, 99);
        if      (r < 8)  put(OP_WRITE_LOCK, ($urandom_range(0, 1) != 0) ? WDOG_UNLOCK_KEY : $urandom);
        else if (r < 16) put(OP_WRITE_LOAD, 32'($urandom_range(0, 30)));
        else if (r < 30) put(OP_SERVICE);
        else if (r < 36) put(OP_DISABLE, '0, $urandom_range(0, 5));
        else if (r < 50) put(OP_ENABLE);
        else             put(OP_IDLE, '0, $urandom_range(1, 20));
      end
    endtask
  endclass

  // ---------------------------------------------------------------------
  class driver;
    virtual wdog_if    vif;
    mailbox #(wdog_op) from_gen;
    function new(virtual wdog_if v, mailbox #(wdog_op) m);
      vif = v; from_gen = m;
    endfunction

    task idle(int n);
      repeat (n) @(negedge vif.WDOGCLK);
    endtask

    task apb_write(wdog_addr_t a, logic [WDOG_WIDTH-1:0] d);
      vif.PSEL = 1'b1; vif.PENABLE = 1'b0; vif.PWRITE = 1'b1;
      vif.PADDR = a; vif.PWDATA = d;
      @(negedge vif.WDOGCLK);
      vif.PENABLE = 1'b1;
      @(negedge vif.WDOGCLK);
      vif.PSEL = 1'b0; vif.PENABLE = 1'b0; vif.PWRITE = 1'b0;
    endtask

    task run();
      wdog_op t;
      while (from_gen.try_get(t) > 0) begin
        case (t.op)
          OP_WRITE_LOCK: apb_write(WDOG_ADDR_LOCK, t.data);
          OP_WRITE_LOAD: apb_write(WDOG_ADDR_LOAD, t.data);
          OP_SERVICE: begin
            vif.WDOGINTEN = 1'b1;
            @(negedge vif.WDOGCLK);
            vif.WDOGINTEN = 1'b0;
          end
          OP_ENABLE:  begin vif.WDOGCLKEN = 1'b1; @(negedge vif.WDOGCLK); end
          OP_DISABLE: begin vif.WDOGCLKEN = 1'b0; @(negedge vif.WDOGCLK); end
          default:    @(negedge vif.WDOGCLK);
        endcase
        idle(t.cycles);
      end
    endtask
  endclass

  // ---------------------------------------------------------------------
  class monitor;
    virtual wdog_if        vif;
    mailbox #(wdog_sample) to_sb;
    function new(virtual wdog_if v, mailbox #(wdog_sample) m);
      vif = v; to_sb = m;
    endfunction

    task run();
      forever begin
        wdog_sample s = new();
        @(posedge vif.WDOGCLK);
        s.psel = vif.PSEL; s.penable = vif.PENABLE; s.pwrite = vif.PWRITE;
        s.paddr = vif.PADDR; s.pwdata = vif.PWDATA;
        s.clken = vif.WDOGCLKEN; s.inten = vif.WDOGINTEN;
        #1;
        s.wdogint = vif.WDOGINT; s.wdogres = vif.WDOGRES; s.count = vif.WDOGCOUNT;
        to_sb.put(s);
      end
    endtask
  endclass

  // ---------------------------------------------------------------------
  class scoreboard;
    mailbox #(wdog_sample) from_mon;
    int checks = 0, failures = 0;
    int n_int = 0, n_serviced = 0, n_reset = 0, n_stall = 0;
    // Reference state, equal to the device's state right after reset.
    logic                  unlocked = 1'b0, reload = 1'b0, pending = 1'b0;
    logic                  int_q = 1'b0, res_q = 1'b0;
    logic [WDOG_WIDTH-1:0] load = '1, count = '1;

    function new(mailbox #(wdog_sample) m); from_mon = m; endfunction

    function void predict(wdog_sample s);
      logic wr, want;
      wr   = s.psel && s.penable && s.pwrite;
      want = pending || reload || s.inten;
      res_q = 1'b0;
      if (s.clken) begin
        pending = 1'b0;
        if (want) count = load;
        else if (count == '0) begin
          count = load;
          if (int_q) begin res_q = 1'b1; int_q = 1'b0; end
          else begin int_q = 1'b1; n_int++; end
        end else count = count - 1;
      end else begin
        n_stall++;
        if (reload || s.inten) pending = 1'b1;
      end
      if (s.inten) begin
        if (int_q) n_serviced++;
        int_q = 1'b0;
      end
      if (res_q) n_reset++;
      reload = 1'b0;
      if (wr && s.paddr == WDOG_ADDR_LOCK) unlocked = (s.pwdata == WDOG_UNLOCK_KEY);
      else if (wr && s.paddr == WDOG_ADDR_LOAD && unlocked) begin
        load = s.pwdata; reload = 1'b1;
      end
    endfunction

    function void compare(string what, logic [WDOG_WIDTH-1:0] got, logic [WDOG_WIDTH-1:0] exp);
      checks++;
      if (got !== exp) begin
        failures++;
        if (failures < 20) $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
      end
    endfunction

    task run();
      wdog_sample s;
      forever begin
        from_mon.get(s);
        predict(s);
        compare("WDOGCOUNT", s.count, count);
        compare("WDOGINT", WDOG_WIDTH'(s.wdogint), WDOG_WIDTH'(int_q));
        compare("WDOGRES", WDOG_WIDTH'(s.wdogres), WDOG_WIDTH'(res_q));
      end
    endtask
  endclass

  // ---------------------------------------------------------------------
  logic clk = 1'b0;
  always #5 clk = ~clk;

  wdog_if bus (.WDOGCLK(clk));

  watchdog dut (
    .WDOGCLK   (clk),
    .PRESETn   (bus.PRESETn),
    .PSEL      (bus.PSEL),
    .PENABLE   (bus.PENABLE),
    .PWRITE    (bus.PWRITE),
    .PADDR     (bus.PADDR),
    .PWDATA    (bus.PWDATA),
    .WDOGCLKEN (bus.WDOGCLKEN),
    .WDOGINTEN (bus.WDOGINTEN),
    .WDOGINT   (bus.WDOGINT),
    .WDOGRES   (bus.WDOGRES),
    .WDOGCOUNT (bus.WDOGCOUNT)
  );

  mailbox #(wdog_op)     gen2drv = new();
  mailbox #(wdog_sample) mon2sb  = new();
  generator  gen;
  driver     drv;
  monitor    mon;
  scoreboard sb;
  int        checks, failures;

  initial begin
    bus.PRESETn = 1'b0; bus.PSEL = 1'b0; bus.PENABLE = 1'b0; bus.PWRITE = 1'b0;
    bus.PADDR = '0; bus.PWDATA = '0; bus.WDOGCLKEN = 1'b0; bus.WDOGINTEN = 1'b0;
    gen = new(gen2drv);
    drv = new(bus, gen2drv);
    mon = new(bus, mon2sb);
    sb  = new(mon2sb);

    gen.serviced();
    gen.unserviced();
    gen.disabled();
    gen.access();
    gen.random_ops(2000);

    repeat (2) @(negedge clk);
    bus.PRESETn = 1'b1;
    fork
      mon.run();
      sb.run();
    join_none
    @(negedge clk);
    drv.run();
    repeat (3) @(negedge clk);

    checks = sb.checks + 1;
    failures = sb.failures;
    $display("events: interrupt=%0d serviced=%0d reset=%0d stalled_cycles=%0d",
             sb.n_int, sb.n_serviced, sb.n_reset, sb.n_stall);
    if (sb.n_int == 0 || sb.n_serviced == 0 || sb.n_reset == 0 || sb.n_stall == 0) begin
      failures++;
      $display("FAIL: an event never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("FAIL: watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", sb.checks, sb.failures + 1);
    $finish;
  end

endmodule
