// tb_wdog_regs: self-checking test of the WDOGLOAD / WDOGLOCK registers.
//
// Issues APB write transfers (setup phase, then access phase) and checks:
// access is closed after reset; a load write while locked is ignored; the
// key 0x1ACCE551 opens access; an accepted load write updates the value and
// pulses `reload_req` for exactly one cycle; any other key closes access; a
// write outside the access phase or to another offset changes nothing.
module tb_wdog_regs;
  import wdog_pkg::*;

  localparam int unsigned W = 32;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic         psel = 1'b0;
  logic         penable = 1'b0;
  logic         pwrite = 1'b0;
  wdog_addr_t   paddr = '0;
  logic [W-1:0] pwdata = '0;
  logic [W-1:0] load_value;
  logic         reload_req;
  logic         unlocked;

  int checks = 0;
  int failures = 0;
  int reload_pulses = 0;

  wdog_regs dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) if (reload_req) reload_pulses++;

  task automatic expect_eq(input string what, input logic [W-1:0] got, input logic [W-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // One APB write: setup phase, access phase, back to idle. Returns after the
  // access-phase edge, at the following negative edge.
  task automatic apb_write(input wdog_addr_t a, input logic [W-1:0] d);
    psel = 1'b1; penable = 1'b0; pwrite = 1'b1; paddr = a; pwdata = d;
    @(negedge clk);
    penable = 1'b1;
    @(negedge clk);
    psel = 1'b0; penable = 1'b0; pwrite = 1'b0;
  endtask

  int prev;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    expect_eq("locked after reset", W'(unlocked), 0);
    expect_eq("load reset value", load_value, '1);

    // Locked: load write ignored, no reload request.
    prev = reload_pulses;
    apb_write(WDOG_ADDR_LOAD, 32'd10);
    @(negedge clk);
    expect_eq("locked load ignored", load_value, '1);
    expect_eq("locked no reload", W'(reload_pulses - prev), 0);

    // Wrong key keeps access closed.
    apb_write(WDOG_ADDR_LOCK, 32'h1ACC_E550);
    expect_eq("wrong key", W'(unlocked), 0);

    // Unlock, then write the load register.
    apb_write(WDOG_ADDR_LOCK, WDOG_UNLOCK_KEY);
    expect_eq("unlocked", W'(unlocked), 1);
    prev = reload_pulses;
    psel = 1'b1; penable = 1'b0; pwrite = 1'b1; paddr = WDOG_ADDR_LOAD; pwdata = 32'h0A;
    @(negedge clk);
    expect_eq("no write in setup phase", load_value, '1);
    expect_eq("no reload in setup phase", W'(reload_req), 0);
    penable = 1'b1;
    @(negedge clk);
    psel = 1'b0; penable = 1'b0; pwrite = 1'b0;
    expect_eq("load written", load_value, 32'h0A);
    expect_eq("reload pulse high", W'(reload_req), 1);
    @(negedge clk);
    expect_eq("reload pulse one cycle", W'(reload_req), 0);
    expect_eq("one reload pulse", W'(reload_pulses - prev), 1);

    // Read transfer (PWRITE low) and an unknown offset change nothing.
    psel = 1'b1; paddr = WDOG_ADDR_LOAD; pwdata = 32'd99; pwrite = 1'b0;
    @(negedge clk); penable = 1'b1; @(negedge clk);
    psel = 1'b0; penable = 1'b0;
    apb_write(wdog_addr_t'(12'h008 >> 2), 32'd77);
    expect_eq("no stray writes", load_value, 32'h0A);

    // Random writes against a reference model.
    begin
      logic ref_unlocked;
      logic [W-1:0] ref_load;
      ref_unlocked = 1'b1;
      ref_load = 32'h0A;
      for (int i = 0; i < 300; i++) begin
        wdog_addr_t a;
        logic [W-1:0] d;
        a = ($urandom_range(0, 1) == 0) ? WDOG_ADDR_LOAD : WDOG_ADDR_LOCK;
        d = ($urandom_range(0, 2) == 0) ? WDOG_UNLOCK_KEY : $urandom;
        prev = reload_pulses;
        apb_write(a, d);
        @(negedge clk);
        if (a == WDOG_ADDR_LOCK) ref_unlocked = (d == WDOG_UNLOCK_KEY);
        else if (ref_unlocked) ref_load = d;
        expect_eq("random unlocked", W'(unlocked), W'(ref_unlocked));
        expect_eq("random load", load_value, ref_load);
        expect_eq("random reload", W'(reload_pulses - prev),
                  W'(a == WDOG_ADDR_LOAD && ref_unlocked));
      end
    end

    // Relock with another value: further load writes are ignored.
    apb_write(WDOG_ADDR_LOCK, 32'h0);
    expect_eq("relocked", W'(unlocked), 0);
    prev = load_value;
    apb_write(WDOG_ADDR_LOAD, 32'd25);
    expect_eq("relocked load ignored", load_value, W'(prev));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
