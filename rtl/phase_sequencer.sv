// phase_sequencer: generates the four-phase stepping code for the coil
// drivers.
//
// A 2-bit position register walks the ring A,9,5,6 (stepper_pkg::STEP_CODE):
// one place forward on each `step` pulse when `dir` is clockwise, one place
// back (giving 6,5,9,A) when it is counter-clockwise. The code of the new
// position is loaded into the output register `phases` on the same clock
// edge, so the coil lines change one cycle after `step` and stay fixed
// between steps; a direction change takes effect at the next step and always
// continues from the pattern currently applied. `phases[3]` drives coil
// Phase 1 and `phases[0]` drives Phase 4, matching the left-to-right order
// of the bits in the code.
//
// The code and its reversal for the other direction follow the original
// design, as does a clearable output register (an FDC flip-flop in the
// synthesized schematic). Clearing to 0000, which leaves all coils
// unpowered until the first step, and holding the last pattern while no
// steps come (so the shaft keeps its holding torque) are this design's
// choices.
module phase_sequencer
  import stepper_pkg::*;
(
  input  logic       clk,
  input  logic       rst,     // asynchronous clear, active high
  input  logic       step,    // advance one step this cycle
  input  dir_e       dir,     // DIR_CW: A,9,5,6  DIR_CCW: 6,5,9,A
  output logic [3:0] phases   // coil-driver lines, bit 3 = Phase 1
);

  logic [1:0] pos, pos_next;

  always_comb begin
    pos_next = (dir == DIR_CW) ? pos + 2'd1 : pos - 2'd1;
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      pos    <= '0;
      phases <= '0;
    end else if (step) begin
      pos    <= pos_next;
      phases <= STEP_CODE[pos_next];
    end
  end

endmodule
