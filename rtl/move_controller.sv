// move_controller: decides when the motor may step, from the run/stop and
// angle switches.
//
// While `on_off` is low the controller is IDLE and `run` is low, so the step
// timer is held and no steps are issued. When `on_off` rises, or while it is
// high the angle selection or the direction changes, a new move starts: with
// `angle_sel` = ANGLE_CONT the controller stays in CONT and lets every timer
// tick through; otherwise it loads 6, 12 or 18 steps (45, 90 or 135 degrees
// at 7.5 degrees per step) into a down-counter, counts one off for each
// tick, and after the last step goes to DONE, where `run` is low and the
// motor holds its position until the switches change again.
//
// `run` is registered-state only and is forced low for the cycle in which a
// new move starts, which clears the step timer; the first step of every move
// therefore comes one full step period after the move starts. `tick` is the
// step timer's output and is only high while `run` is high.
//
// The switch meanings (switch 1 run/stop, switches 5 and 4 the angle, switch
// 2 the direction) and the angle values follow the original design. How a
// finished move is started again is not given there: restarting on the
// switches, as above, is this design's choice.
module move_controller
  import stepper_pkg::*;
(
  input  logic       clk,
  input  logic       rst,        // asynchronous clear, active high
  input  logic       on_off,     // switch 1: 1 lets the motor rotate
  input  angle_sel_e angle_sel,  // switches 5 and 4
  input  dir_e       dir,        // switch 2, only watched for changes here
  input  logic       tick,       // step timer pulse
  output logic       run,        // enable for the step timer
  output logic       busy,       // a move or continuous rotation is under way
  output logic       done        // a fixed-angle move has finished
);

  typedef enum logic [1:0] {
    IDLE = 2'd0,
    CONT = 2'd1,
    MOVE = 2'd2,
    DONE = 2'd3
  } state_e;

  state_e                state;
  logic [STEP_CNT_W-1:0] remaining;
  logic                  on_q;
  angle_sel_e            angle_q;
  dir_e                  dir_q;
  logic                  start;

  always_comb begin
    start = on_off && (!on_q || angle_sel != angle_q || dir != dir_q);
    busy  = (state == CONT) || (state == MOVE);
    run   = on_off && busy && !start;
    done  = (state == DONE);
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      state     <= IDLE;
      remaining <= '0;
      on_q      <= 1'b0;
      angle_q   <= ANGLE_CONT;
      dir_q     <= DIR_CW;
    end else begin
      on_q    <= on_off;
      angle_q <= angle_sel;
      dir_q   <= dir;
      if (!on_off) begin
        state     <= IDLE;
        remaining <= '0;
      end else if (start) begin
        if (angle_sel == ANGLE_CONT) begin
          state     <= CONT;
          remaining <= '0;
        end else begin
          state     <= MOVE;
          remaining <= steps_for_angle(angle_sel);
        end
      end else if (state == MOVE && tick) begin
        remaining <= remaining - 1'b1;
        if (remaining == STEP_CNT_W'(1)) state <= DONE;
      end
    end
  end

  // A tick may only arrive while the controller lets the timer run.
  a_tick_only_when_running: assert property (@(posedge clk) disable iff (rst) tick |-> run);
  // A fixed move never counts below zero.
  a_no_underflow: assert property (@(posedge clk) disable iff (rst)
                                   (state == MOVE) |-> (remaining != '0));

endmodule
