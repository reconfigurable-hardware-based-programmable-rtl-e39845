// tb_move_controller: self-checking test of the run/stop and angle logic.
//
// The testbench plays the step timer itself: while `run` is high it issues a
// tick every P cycles, counted from the cycle `run` rose. For each switch
// setting it counts the ticks the controller lets through and compares with
// the step counts worked out from 7.5 degrees per step: 45 deg = 6,
// 90 deg = 12, 135 deg = 18, continuous = no end. Also checked: `run` drops
// in the same cycle the run/stop switch goes off, a finished move holds,
// and changing the angle or direction, or switching off and on, starts a
// new move.
module tb_move_controller;
  import stepper_pkg::*;

  localparam int P = 4;

  logic       clk = 1'b0;
  logic       rst = 1'b1;
  logic       on_off = 1'b0;
  angle_sel_e angle_sel = ANGLE_CONT;
  dir_e       dir = DIR_CW;
  logic       tick;
  logic       run, busy, done;

  int checks = 0, failures = 0;
  int tcnt = 0;     // model timer
  int ticks = 0;    // ticks issued since the last clear

  always #5 clk = ~clk;

  assign tick = run && (tcnt == P - 1);

  always @(posedge clk) begin
    if (!run || tick) tcnt <= 0;
    else              tcnt <= tcnt + 1;
    if (tick) ticks <= ticks + 1;
  end

  move_controller dut (
    .clk(clk), .rst(rst), .on_off(on_off), .angle_sel(angle_sel), .dir(dir),
    .tick(tick), .run(run), .busy(busy), .done(done));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  function automatic int expected_steps(angle_sel_e a);
    case (a)
      ANGLE_45:  return 6;
      ANGLE_90:  return 12;
      ANGLE_135: return 18;
      default:   return -1;
    endcase
  endfunction

  // Let a started move run to its end and check the step count and hold.
  task automatic finish_move(input angle_sel_e a);
    int n = expected_steps(a);
    int waited = 1;
    @(negedge clk);  // the switch change is seen on this edge
    while (!done && waited < 40 * P) begin
      @(negedge clk);
      waited++;
    end
    check(done, $sformatf("move of %0d steps never finished", n));
    check(ticks == n, $sformatf("move of angle %0d gave %0d steps, expected %0d", a, ticks, n));
    // Duration: n periods plus the start cycle.
    check(waited >= n * P && waited <= n * P + 2,
          $sformatf("move took %0d cycles, expected about %0d", waited, n * P));
    repeat (5 * P) begin
      @(negedge clk);
      check(!run && done, "controller did not hold after the move");
    end
    check(ticks == n, "extra steps after the move ended");
  endtask

  task automatic clear_ticks();
    @(negedge clk);
    ticks = 0;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 1'b0;
    repeat (3) @(negedge clk);
    check(!run && !busy, "running while switched off");

    // Continuous rotation: ticks keep coming.
    clear_ticks();
    on_off = 1'b1;
    repeat (50 * P) @(negedge clk);
    check(busy && !done, "continuous mode not busy");
    check(ticks >= 49 && ticks <= 50, $sformatf("continuous: %0d ticks in %0d cycles", ticks, 50 * P));

    // Switch off: run drops at once and no more steps.
    on_off = 1'b0;
    #1 check(!run, "run not cleared by the stop switch");
    clear_ticks();
    repeat (10 * P) @(negedge clk);
    check(ticks == 0 && !busy, "steps while stopped");

    // Each fixed angle, both directions, started by switching on.
    for (int d = 0; d < 2; d++) begin
      for (int a = 1; a < 4; a++) begin
        angle_sel = angle_sel_e'(a);
        dir       = dir_e'(d);
        repeat (2) @(negedge clk);
        ticks = 0;
        on_off = 1'b1;
        finish_move(angle_sel_e'(a));
        on_off = 1'b0;
        repeat (3) @(negedge clk);
        check(!done && !busy, "not idle after switching off");
      end
    end

    // Restart by changing the angle while on.
    angle_sel = ANGLE_45;
    dir = DIR_CW;
    clear_ticks();
    on_off = 1'b1;
    finish_move(ANGLE_45);
    angle_sel = ANGLE_90;
    ticks = 0;
    finish_move(ANGLE_90);
    // Restart by changing direction.
    dir = DIR_CCW;
    ticks = 0;
    finish_move(ANGLE_90);
    // Change the angle in the middle of a move: the new move starts afresh.
    angle_sel = ANGLE_135;
    repeat (3 * P + 1) @(negedge clk);
    angle_sel = ANGLE_45;
    ticks = 0;
    finish_move(ANGLE_45);
    // From a finished move to continuous.
    angle_sel = ANGLE_CONT;
    clear_ticks();
    repeat (30 * P) @(negedge clk);
    check(busy && ticks >= 29, $sformatf("continuous after move: %0d ticks", ticks));
    on_off = 1'b0;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
