// stepper_pkg: types and constants shared by the stepper motor controller.
//
// The four-phase stepping code A,9,5,6 (one hex digit per step, bit 3 drives
// coil Phase 1, bit 0 drives Phase 4) and the 7.5 degree step of a 48-pole
// motor are the motor's own figures. The switch encodings follow the control
// panel: switch 2 selects the direction, switches 5 and 4 select continuous
// rotation or a 45, 90 or 135 degree move. Step counts per move are derived
// from the step angle: 45/7.5 = 6, 90/7.5 = 12, 135/7.5 = 18.
package stepper_pkg;

  // Number of entries in the phase-sequence ring.
  localparam int unsigned SEQ_LEN = 4;

  // Clockwise stepping code. Walking it backwards (6,5,9,A) turns the shaft
  // counter-clockwise.
  localparam logic [3:0] STEP_CODE [SEQ_LEN] = '{4'hA, 4'h9, 4'h5, 4'h6};

  // Motor geometry: 48 steps per revolution, 7.5 degrees per step, kept in
  // tenths of a degree so that the arithmetic stays integral.
  localparam int unsigned STEPS_PER_REV     = 48;
  localparam int unsigned STEP_ANGLE_TENTHS = 3600 / STEPS_PER_REV;  // 75

  // Width of the remaining-step counter; holds the longest move (18 steps).
  localparam int unsigned STEP_CNT_W = 5;

  typedef enum logic {
    DIR_CW  = 1'b0,
    DIR_CCW = 1'b1
  } dir_e;

  typedef enum logic [1:0] {
    ANGLE_CONT = 2'b00,
    ANGLE_45   = 2'b01,
    ANGLE_90   = 2'b10,
    ANGLE_135  = 2'b11
  } angle_sel_e;

  // Steps needed for a move; 0 stands for continuous rotation.
  function automatic logic [STEP_CNT_W-1:0] steps_for_angle(angle_sel_e sel);
    case (sel)
      ANGLE_45:  return STEP_CNT_W'(450  / STEP_ANGLE_TENTHS);
      ANGLE_90:  return STEP_CNT_W'(900  / STEP_ANGLE_TENTHS);
      ANGLE_135: return STEP_CNT_W'(1350 / STEP_ANGLE_TENTHS);
      default:   return '0;
    endcase
  endfunction

endpackage
