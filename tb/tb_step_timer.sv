// tb_step_timer: self-checking test of the step-rate divider.
//
// A small instance (periods 5 and 13 cycles) is checked tick by tick: the
// first tick comes exactly one period after enable rises, following ticks
// are one period apart for the speed in force, nothing ticks while enable is
// low, and a speed change takes effect. A second instance with the default
// parameters measures one 2 ms (100,000-cycle) and one 10 ms
// (500,000-cycle) interval at 50 MHz.
module tb_step_timer;

  localparam int unsigned FAST = 5;
  localparam int unsigned SLOW = 13;

  logic clk = 1'b0;
  logic rst = 1'b1;
  logic enable = 1'b0, low_speed = 1'b0;
  logic tick;
  logic en_full = 1'b0, slow_full = 1'b0;
  logic tick_full;

  int checks = 0, failures = 0;
  longint cycle = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  step_timer #(.CNT_W(8), .FAST_DELAY_CYCLES(FAST), .SLOW_DELAY_CYCLES(SLOW)) dut (
    .clk(clk), .rst(rst), .enable(enable), .low_speed(low_speed), .tick(tick));

  step_timer dut_full (
    .clk(clk), .rst(rst), .enable(en_full), .low_speed(slow_full), .tick(tick_full));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0d: %s", cycle, what);
    end
  endtask

  // Wait for the next tick of the small instance; return the number of
  // rising clock edges from the call to the edge on which tick was sampled.
  task automatic cycles_to_tick(output int n, input int limit);
    n = 0;
    do begin
      @(posedge clk);
      n++;
    end while (!tick && n < limit);
    @(negedge clk);
  endtask

  task automatic full_interval(output longint n);
    n = 0;
    do begin
      @(posedge clk);
      n++;
    end while (!tick_full && n < 2_000_000);
    @(negedge clk);
  endtask

  initial begin
    int n;
    longint nl;
    repeat (3) @(negedge clk);
    rst = 1'b0;

    // Disabled: no tick at all.
    repeat (40) begin
      @(posedge clk);
      check(!tick, "tick while disabled");
    end

    // Enable at fast speed: first tick after FAST edges, then every FAST.
    @(negedge clk);
    enable = 1'b1;
    cycles_to_tick(n, 100);
    check(n == FAST, $sformatf("first fast tick after %0d, expected %0d", n, FAST));
    repeat (4) begin
      cycles_to_tick(n, 100);
      check(n == FAST, $sformatf("fast interval %0d, expected %0d", n, FAST));
    end

    // Switch to slow right after a tick: the next intervals are SLOW.
    low_speed = 1'b1;
    repeat (4) begin
      cycles_to_tick(n, 100);
      check(n == SLOW, $sformatf("slow interval %0d, expected %0d", n, SLOW));
    end

    // Disable mid-period, then re-enable: the period restarts from zero.
    repeat (7) @(negedge clk);
    enable = 1'b0;
    repeat (30) begin
      @(posedge clk);
      check(!tick, "tick while disabled");
    end
    @(negedge clk);
    enable = 1'b1;
    cycles_to_tick(n, 100);
    check(n == SLOW, $sformatf("slow tick after re-enable %0d, expected %0d", n, SLOW));

    // Speed shortened while the count is past the fast period: tick next edge.
    repeat (9) @(negedge clk);
    low_speed = 1'b0;
    cycles_to_tick(n, 100);
    check(n == 1, $sformatf("tick after shortening %0d, expected 1", n));
    cycles_to_tick(n, 100);
    check(n == FAST, $sformatf("fast interval after shortening %0d", n));

    // Default-size instance: 2 ms and 10 ms at 50 MHz.
    en_full = 1'b1;
    full_interval(nl);
    check(nl == 100_000, $sformatf("2 ms period measured %0d cycles", nl));
    full_interval(nl);
    check(nl == 100_000, $sformatf("2 ms period measured %0d cycles", nl));
    slow_full = 1'b1;
    full_interval(nl);
    check(nl == 500_000, $sformatf("10 ms period measured %0d cycles", nl));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
