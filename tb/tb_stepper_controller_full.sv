// tb_stepper_controller_full: the stepper controller at its real size, with
// a 50 MHz clock (20 ns period) and the default step delays of 2 ms and
// 10 ms.
//
// Two complete operations are run through a motor model: a 45 degree
// clockwise move at high speed straight after reset, then a 45 degree
// counter-clockwise move at low speed. Each must produce six coil pattern
// changes spaced exactly 2 ms (100,000 clock cycles) or 10 ms (500,000
// cycles) apart, and then hold. The first pattern after reset only
// energizes the coils, so the first move turns the shaft five steps beyond
// the position it was pulled into; the second turns it six steps back.
module tb_stepper_controller_full;
  timeunit 1ns;
  timeprecision 1ps;

  logic       clk = 1'b0;
  logic       rst = 1'b0;
  logic       on_off = 1'b0;
  logic       direction_of_rotation = 1'b0;
  logic       low_speed = 1'b0;
  logic [1:0] angle_sel = 2'b00;
  logic [3:0] motor_fases;

  int position, steps_cw, steps_ccw, bad, aligns;
  int checks = 0, failures = 0;

  always #10 clk = ~clk;  // 50 MHz

  stepper_controller_top dut (
    .clk(clk), .rst(rst), .on_off(on_off),
    .direction_of_rotation(direction_of_rotation), .low_speed(low_speed),
    .angle_sel(angle_sel), .motor_fases(motor_fases));

  stepper_motor_model motor (
    .phases(motor_fases), .position(position), .steps_cw(steps_cw),
    .steps_ccw(steps_ccw), .bad(bad), .aligns(aligns));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // Run one 45 degree move and check the six pattern changes.
  task automatic move45(input logic dir, input logic slow);
    realtime t_prev, t_now;
    realtime period = slow ? 10.0e6 : 2.0e6;  // ns
    logic [3:0] pat;
    realtime t_on;
    angle_sel = 2'b01;
    direction_of_rotation = dir;
    low_speed = slow;
    repeat (3) @(negedge clk);
    on_off = 1'b1;
    t_on = $realtime;
    t_prev = t_on;
    for (int i = 0; i < 6; i++) begin
      pat = motor_fases;
      @(motor_fases or posedge rst);
      t_now = $realtime;
      if (i == 0) begin
        // Synchronizer, start and output-register cycles come on top.
        check(t_now - t_prev >= period && t_now - t_prev <= period + 100.0,
              $sformatf("first step %0.0f ns after the switch, expected %0.0f", t_now - t_prev, period));
      end else begin
        check(t_now - t_prev == period,
              $sformatf("step %0d came %0.0f ns after the last, expected %0.0f", i, t_now - t_prev, period));
      end
      check(motor_fases != pat, "pattern did not change");
      t_prev = t_now;
    end
    // Hold for two more periods.
    pat = motor_fases;
    #(2.0 * period);
    check(motor_fases == pat, "coils changed after the move ended");
    $display("45 degree move %s at %0.0f ms per step: %0.1f ms in all",
             dir ? "CCW" : "CW", period / 1.0e6, (t_prev - t_on) / 1.0e6);
    on_off = 1'b0;
    repeat (5) @(negedge clk);
  endtask

  int p_after1, bad0;

  initial begin
    #1 rst = 1'b1;
    repeat (3) @(negedge clk);
    check(motor_fases == 4'h0, "coils not off after reset");
    rst = 1'b0;
    bad0 = bad;  // changes before the reset are not counted

    move45(1'b0, 1'b0);
    check(aligns == 1 && position == 5,
          $sformatf("first move: %0d aligns, shaft at %0d steps, expected 1 and 5", aligns, position));
    p_after1 = position;
    move45(1'b1, 1'b1);
    check(position - p_after1 == -6,
          $sformatf("second move turned %0d steps, expected -6", position - p_after1));
    check(motor.angle_tenths() == 3600 - 75,
          $sformatf("shaft angle %0d tenths of a degree, expected 3525", motor.angle_tenths()));

    check(bad == bad0 && steps_cw == 5 && steps_ccw == 6,
          $sformatf("model saw %0d CW, %0d CCW, %0d illegal changes", steps_cw, steps_ccw, bad - bad0));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
