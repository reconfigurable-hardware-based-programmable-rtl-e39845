// stepper_controller_top: programmable phase-sequence controller for a
// four-phase, 48-pole (7.5 degree) stepper motor, driven from five slide
// switches and feeding four coil-driver transistors.
//
// Structure: the switches pass through a two-flop synchronizer; the
// move_controller turns switch 1 (run/stop) and switches 5/4 (continuous or
// 45/90/135 degrees) into a `run` enable; the step_timer divides the 50 MHz
// clock into a step tick every 2 ms (switch 3 off, high speed) or 10 ms
// (switch 3 on, low speed); on each tick the phase_sequencer moves one place
// along the code A,9,5,6 (switch 2 off, clockwise) or 6,5,9,A (switch 2 on,
// counter-clockwise) and registers it onto `motor_fases`.
//
// Timing: a switch change reaches the controller two cycles after it is
// sampled; the first step of a move comes one step period after the move
// starts, and later steps one period apart; each pattern change appears on
// `motor_fases` one cycle after its tick. A fixed move of N steps therefore
// lasts N step periods, after which the outputs hold the last pattern.
//
// Port names direction_of_rotation, on_off and Motor_fases(3:0) are the ones
// of the original design; the other ports, the reset and the synchronizer are
// this design's choices.
module stepper_controller_top
  import stepper_pkg::*;
#(
  parameter int unsigned CNT_W             = 20,
  parameter int unsigned FAST_DELAY_CYCLES = 100_000,  // 2 ms at 50 MHz
  parameter int unsigned SLOW_DELAY_CYCLES = 500_000   // 10 ms at 50 MHz
) (
  input  logic       clk,                    // 50 MHz board clock
  input  logic       rst,                    // asynchronous clear, active high
  input  logic       on_off,                 // switch 1
  input  logic       direction_of_rotation,  // switch 2: 0 CW, 1 CCW
  input  logic       low_speed,              // switch 3: 0 fast, 1 slow
  input  logic [1:0] angle_sel,              // switches 5 (bit 1) and 4 (bit 0)
  output logic [3:0] motor_fases             // bit 3 = Phase 1 ... bit 0 = Phase 4
);

  logic [4:0] sw_s;
  logic       on_s, dir_s, slow_s;
  logic [1:0] angle_s;
  logic       run, tick;

  switch_sync #(.WIDTH(5)) u_sync (
    .clk (clk),
    .rst (rst),
    .d   ({angle_sel, low_speed, direction_of_rotation, on_off}),
    .q   (sw_s)
  );

  assign {angle_s, slow_s, dir_s, on_s} = sw_s;

  move_controller u_move (
    .clk       (clk),
    .rst       (rst),
    .on_off    (on_s),
    .angle_sel (angle_sel_e'(angle_s)),
    .dir       (dir_e'(dir_s)),
    .tick      (tick),
    .run       (run),
    .busy      (),
    .done      ()
  );

  step_timer #(
    .CNT_W             (CNT_W),
    .FAST_DELAY_CYCLES (FAST_DELAY_CYCLES),
    .SLOW_DELAY_CYCLES (SLOW_DELAY_CYCLES)
  ) u_timer (
    .clk       (clk),
    .rst       (rst),
    .enable    (run),
    .low_speed (slow_s),
    .tick      (tick)
  );

  phase_sequencer u_seq (
    .clk    (clk),
    .rst    (rst),
    .step   (tick),
    .dir    (dir_e'(dir_s)),
    .phases (motor_fases)
  );

endmodule
