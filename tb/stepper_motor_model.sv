// stepper_motor_model: behavioural model of a four-phase, 48-pole stepper
// motor (7.5 degrees per step), for testbenches only; it is not
// synthesizable logic.
//
// The shaft follows the coil pattern on `phases` (bit 3 = Phase 1). A change
// between two patterns of the code A,9,5,6 that are neighbours in that ring
// turns the shaft one step: forwards in the ring is clockwise and counts
// +1, backwards is counter-clockwise and counts -1. The first pattern after
// all coils were off only pulls the rotor into line with it and is not
// counted as a step. Any other change (a pattern outside the code, a jump of
// two places, switching the coils off) is counted in `bad`.
module stepper_motor_model #(
  parameter int STEPS_PER_REV = 48
) (
  input  logic [3:0] phases,
  output int         position,   // steps, clockwise positive
  output int         steps_cw,
  output int         steps_ccw,
  output int         bad,
  output int         aligns      // energizations from all-off
);

  function automatic int ring_index(logic [3:0] p);
    case (p)
      4'hA:    return 0;
      4'h9:    return 1;
      4'h5:    return 2;
      4'h6:    return 3;
      default: return -1;
    endcase
  endfunction

  logic [3:0] last;

  initial begin
    position  = 0;
    steps_cw  = 0;
    steps_ccw = 0;
    bad       = 0;
    aligns    = 0;
    last      = 4'h0;
  end

  always @(phases) begin
    int a, b;
    a = ring_index(last);
    b = ring_index(phases);
    if (phases == last) begin
      // no change
    end else if (last == 4'h0 && b >= 0) begin
      aligns++;
    end else if (a >= 0 && b == (a + 1) % 4) begin
      position++;
      steps_cw++;
    end else if (a >= 0 && b == (a + 3) % 4) begin
      position--;
      steps_ccw++;
    end else begin
      bad++;
    end
    last = phases;
  end

  // Shaft angle in tenths of a degree, 0 to 3599.
  function automatic int angle_tenths();
    int p = position % STEPS_PER_REV;
    if (p < 0) p += STEPS_PER_REV;
    return p * (3600 / STEPS_PER_REV);
  endfunction

endmodule
