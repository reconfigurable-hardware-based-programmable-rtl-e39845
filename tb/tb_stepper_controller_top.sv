// tb_stepper_controller_top: end-to-end test of the stepper controller with
// a motor model on its outputs.
//
// The controller runs with short step periods (20 cycles for high speed, 60
// for low speed) so that whole moves fit in a short simulation; the switch
// logic and the step counts are those of the full design. The testbench
// sets the five switches as an operator would and checks, from the shaft
// position of the motor model and the times its steps happen:
//   - coils off after reset and no step while switched off;
//   - continuous rotation, clockwise and counter-clockwise, one step per
//     period at each speed, one full revolution per 48 steps;
//   - 45/90/135 degree moves turn the shaft by 6/12/18 steps in the right
//     direction and in the right time, then hold;
//   - a move is restarted by a change of angle or direction;
//   - the stop switch stops the shaft at once;
//   - no illegal pattern or skipped phase ever reaches the coils.
// Each of these mechanisms is counted, and one that never happened counts
// as a failure.
module tb_stepper_controller_top;

  localparam int FAST = 20;
  localparam int SLOW = 60;

  logic       clk = 1'b0;
  logic       rst = 1'b0;
  logic       on_off = 1'b0;
  logic       direction_of_rotation = 1'b0;
  logic       low_speed = 1'b0;
  logic [1:0] angle_sel = 2'b00;
  logic [3:0] motor_fases;

  int position, steps_cw, steps_ccw, bad, aligns;
  int checks = 0, failures = 0;
  longint cycle = 0;
  longint last_step_cycle = 0;
  longint step_events = 0;
  logic [3:0] fases_q = 4'h0;

  // Mechanism counters.
  int n_stop = 0, n_cw = 0, n_ccw = 0, n_fast = 0, n_slow = 0, n_cont = 0;
  int n_move45 = 0, n_move90 = 0, n_move135 = 0, n_hold = 0, n_restart = 0, n_rev = 0;

  always #5 clk = ~clk;

  stepper_controller_top #(
    .CNT_W(8), .FAST_DELAY_CYCLES(FAST), .SLOW_DELAY_CYCLES(SLOW)
  ) dut (
    .clk(clk), .rst(rst), .on_off(on_off),
    .direction_of_rotation(direction_of_rotation), .low_speed(low_speed),
    .angle_sel(angle_sel), .motor_fases(motor_fases));

  stepper_motor_model motor (
    .phases(motor_fases), .position(position), .steps_cw(steps_cw),
    .steps_ccw(steps_ccw), .bad(bad), .aligns(aligns));

  // Time stamp of every pattern change.
  always @(posedge clk) begin
    cycle   <= cycle + 1;
    fases_q <= motor_fases;
    if (motor_fases != fases_q) begin
      last_step_cycle <= cycle;
      step_events     <= step_events + 1;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0d: %s", cycle, what);
    end
  endtask

  task automatic wait_steps(input int n, input int limit);
    longint target = step_events + n;
    int waited = 0;
    while (step_events < target && waited < limit) begin
      @(negedge clk);
      waited++;
    end
    check(step_events >= target, $sformatf("waited %0d cycles for %0d steps", limit, n));
  endtask

  // Measure n step intervals and check each against the period.
  task automatic measure(input int n, input int period, input int dir_sign);
    longint t0;
    int p0;
    wait_steps(1, 4 * SLOW);
    t0 = last_step_cycle;
    p0 = position;
    for (int i = 0; i < n; i++) begin
      wait_steps(1, 4 * SLOW);
      check(last_step_cycle - t0 == period,
            $sformatf("step interval %0d, expected %0d", last_step_cycle - t0, period));
      t0 = last_step_cycle;
    end
    check(position - p0 == dir_sign * n,
          $sformatf("shaft moved %0d steps, expected %0d", position - p0, dir_sign * n));
    if (position - p0 == dir_sign * n) begin
      if (period == FAST) n_fast++; else n_slow++;
      if (dir_sign > 0) n_cw++; else n_ccw++;
    end
  endtask

  // Start a fixed move by switching on and check angle, time and hold.
  task automatic fixed_move(input logic [1:0] a, input logic dir, input logic slow);
    int steps = (a == 2'b01) ? 6 : (a == 2'b10) ? 12 : 18;
    int period = slow ? SLOW : FAST;
    int p0 = position;
    longint t0;
    int expect_delta = dir ? -steps : steps;
    angle_sel = a;
    direction_of_rotation = dir;
    low_speed = slow;
    repeat (3) @(negedge clk);
    t0 = cycle;
    on_off = 1'b1;
    repeat (steps * period + 10) @(negedge clk);
    check(position - p0 == expect_delta,
          $sformatf("%0d-step move turned %0d steps, expected %0d", steps, position - p0, expect_delta));
    // From the switch to the last step: n periods plus the synchronizer,
    // start and output register cycles.
    check(last_step_cycle - t0 >= steps * period && last_step_cycle - t0 <= steps * period + 5,
          $sformatf("move ended %0d cycles after the switch, expected about %0d",
                    last_step_cycle - t0, steps * period));
    repeat (5 * period) @(negedge clk);
    check(position - p0 == expect_delta, "shaft moved after the move ended");
    if (position - p0 == expect_delta) begin
      n_hold++;
      if (steps == 6) n_move45++;
      if (steps == 12) n_move90++;
      if (steps == 18) n_move135++;
    end
    on_off = 1'b0;
    repeat (5) @(negedge clk);
  endtask

  int bad0, events0;

  initial begin
    int p0;
    #1 rst = 1'b1;
    #1 check(motor_fases == 4'h0, "coils not cleared by reset");
    repeat (3) @(negedge clk);
    rst = 1'b0;
    // Whatever the outputs held before the reset is not counted.
    bad0    = bad;
    events0 = int'(step_events);
    repeat (30) @(negedge clk);
    check(motor_fases == 4'h0 && int'(step_events) == events0, "coils energized while switched off");

    // Continuous clockwise at high speed; the first pattern energizes.
    on_off = 1'b1;
    wait_steps(1, 4 * FAST);
    check(aligns == 1 && motor_fases == 4'h9, "first pattern after reset is not 9");
    measure(10, FAST, +1);
    n_cont++;

    // One full revolution: 48 steps bring back the same pattern.
    begin
      logic [3:0] start_pat;
      start_pat = motor_fases;
      p0 = position;
      wait_steps(48, 60 * FAST);
      check(position - p0 == 48 && motor_fases == start_pat,
            $sformatf("48 steps are not one revolution: moved %0d, pattern %h from %h",
                      position - p0, motor_fases, start_pat));
      if (position - p0 == 48) n_rev++;
    end

    // Low speed.
    low_speed = 1'b1;
    measure(5, SLOW, +1);

    // Counter-clockwise, continuous (a direction change restarts rotation).
    direction_of_rotation = 1'b1;
    measure(6, SLOW, -1);
    n_restart++;
    low_speed = 1'b0;
    measure(8, FAST, -1);
    n_cont++;

    // Stop in the middle of rotation.
    @(negedge clk);
    on_off = 1'b0;
    repeat (3) @(negedge clk);  // synchronizer latency
    p0 = position;
    repeat (10 * SLOW) @(negedge clk);
    check(position == p0, "shaft moved while switched off");
    if (position == p0) n_stop++;

    // Fixed moves, every angle, both directions, both speeds.
    fixed_move(2'b01, 1'b0, 1'b0);
    fixed_move(2'b10, 1'b1, 1'b1);
    fixed_move(2'b11, 1'b0, 1'b0);
    fixed_move(2'b01, 1'b1, 1'b1);
    fixed_move(2'b10, 1'b0, 1'b0);
    fixed_move(2'b11, 1'b1, 1'b0);

    // Restart by a switch change: 90 CW, then after 3 steps flip to CCW.
    angle_sel = 2'b10;
    direction_of_rotation = 1'b0;
    low_speed = 1'b0;
    repeat (3) @(negedge clk);
    p0 = position;
    on_off = 1'b1;
    wait_steps(3, 5 * FAST);
    direction_of_rotation = 1'b1;
    repeat (14 * FAST) @(negedge clk);
    check(position - p0 == 3 - 12, $sformatf("restarted move net %0d, expected -9", position - p0));
    if (position - p0 == -9) n_restart++;
    // Done; change the angle to start a new 45 degree move in place.
    angle_sel = 2'b01;
    p0 = position;
    repeat (8 * FAST) @(negedge clk);
    check(position - p0 == -6, $sformatf("angle change move %0d, expected -6", position - p0));
    if (position - p0 == -6) n_restart++;
    on_off = 1'b0;
    repeat (5) @(negedge clk);

    check(bad == bad0, $sformatf("%0d illegal coil pattern changes", bad - bad0));
    check(steps_cw + steps_ccw + aligns == int'(step_events) - events0, "model and monitor disagree");

    // Every mechanism must have happened.
    check(n_stop > 0, "stop never exercised");
    check(n_cw > 0, "clockwise never exercised");
    check(n_ccw > 0, "counter-clockwise never exercised");
    check(n_fast > 0, "high speed never exercised");
    check(n_slow > 0, "low speed never exercised");
    check(n_cont > 0, "continuous rotation never exercised");
    check(n_move45 > 0, "45 degree move never exercised");
    check(n_move90 > 0, "90 degree move never exercised");
    check(n_move135 > 0, "135 degree move never exercised");
    check(n_hold > 0, "hold after move never exercised");
    check(n_restart > 0, "restart on switch change never exercised");
    check(n_rev > 0, "full revolution never exercised");
    $display("mechanisms: stop=%0d cw=%0d ccw=%0d fast=%0d slow=%0d cont=%0d 45=%0d 90=%0d 135=%0d hold=%0d restart=%0d rev=%0d",
             n_stop, n_cw, n_ccw, n_fast, n_slow, n_cont, n_move45, n_move90, n_move135,
             n_hold, n_restart, n_rev);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
