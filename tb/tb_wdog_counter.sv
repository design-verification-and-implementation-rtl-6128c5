// tb_wdog_counter: self-checking test of the watchdog's down counter.
//
// Drives random load/decrement requests (loads rare, so long runs of
// decrements reach zero) into a 32-bit counter and compares `count` and
// `zero` after every edge with a reference count kept in the testbench.
// Also checks the reset value and that a load beats a decrement.
module tb_wdog_counter;

  localparam int unsigned W = 32;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic         load = 1'b0;
  logic         dec = 1'b0;
  logic [W-1:0] load_value = '0;
  logic [W-1:0] count;
  logic         zero;

  int checks = 0;
  int failures = 0;
  int zeros_seen = 0;
  logic [W-1:0] ref_count;

  wdog_counter dut (.*);

  always #5 clk = ~clk;

  task automatic check(input string what, input logic [W-1:0] exp_count);
    checks++;
    if (count !== exp_count || zero !== (exp_count == '0)) begin
      failures++;
      $display("FAIL %s: count=%0d zero=%0b expected %0d", what, count, zero, exp_count);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    check("reset value", '1);
    rst_n = 1'b1;
    ref_count = '1;

    // Load beats decrement.
    load = 1'b1; dec = 1'b1; load_value = 32'd7;
    @(negedge clk);
    ref_count = 32'd7;
    check("load priority", ref_count);

    // Random stimulus.
    for (int i = 0; i < 4000; i++) begin
      load       = ($urandom_range(0, 39) == 0);
      dec        = ($urandom_range(0, 3) != 0);
      load_value = 32'($urandom_range(0, 20));
      if (i % 500 == 0) begin load = 1'b1; load_value = $urandom; end
      if (ref_count == '0) begin load = 1'b1; load_value = 32'($urandom_range(1, 20)); end
      @(negedge clk);
      if (load)     ref_count = load_value;
      else if (dec) ref_count = ref_count - 1;
      if (ref_count == '0) zeros_seen++;
      check("random", ref_count);
    end

    // Hold: neither load nor dec.
    load = 1'b0; dec = 1'b0;
    repeat (3) @(negedge clk);
    check("hold", ref_count);

    checks++;
    if (zeros_seen == 0) begin
      failures++;
      $display("FAIL: the count never reached zero");
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
