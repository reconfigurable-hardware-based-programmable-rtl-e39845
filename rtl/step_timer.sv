// step_timer: divides the system clock into the step rate of the motor.
//
// A CNT_W-bit up-counter (an incrementer feeding a register, as in the
// synthesized schematic, 20 bits wide) counts clock cycles while `enable` is
// high and returns to zero on the cycle it reaches the selected period less
// one. `tick` is high for exactly that one cycle, so ticks come every
// FAST_DELAY_CYCLES cycles (2 ms at 50 MHz) with `low_speed` low and every
// SLOW_DELAY_CYCLES cycles (10 ms) with it high: the two ends of the
// 2-10 ms range the motor accepts between patterns. While `enable` is low the
// counter is held at zero, so the first tick comes one full period after
// `enable` rises. If the speed switch shortens the period while the count is
// already past it, the next cycle ticks and the counter restarts.
//
// The 2 ms and 10 ms delays and the 20-bit counter follow the original
// design; that the two speeds are exactly these two ends, and the
// terminal-count scheme, are this design's choices.
module step_timer #(
  parameter int unsigned CNT_W             = 20,
  parameter int unsigned FAST_DELAY_CYCLES = 100_000,  // 2 ms at 50 MHz
  parameter int unsigned SLOW_DELAY_CYCLES = 500_000   // 10 ms at 50 MHz
) (
  input  logic clk,
  input  logic rst,        // asynchronous clear, active high
  input  logic enable,     // count while high, hold at zero while low
  input  logic low_speed,  // 0: FAST_DELAY_CYCLES, 1: SLOW_DELAY_CYCLES
  output logic tick        // one-cycle pulse at the end of each period
);

  if (FAST_DELAY_CYCLES < 2 || SLOW_DELAY_CYCLES < 2) begin : gen_chk_period
    $error("step_timer: periods must be at least 2 cycles");
  end
  if (64'(FAST_DELAY_CYCLES) > (64'd1 << CNT_W) ||
      64'(SLOW_DELAY_CYCLES) > (64'd1 << CNT_W)) begin : gen_chk_width
    $error("step_timer: CNT_W too narrow for the step periods");
  end

  logic [CNT_W-1:0] count;
  logic [CNT_W-1:0] last;  // terminal count of the selected period

  always_comb begin
    last = low_speed ? CNT_W'(SLOW_DELAY_CYCLES - 1) : CNT_W'(FAST_DELAY_CYCLES - 1);
    tick = enable && (count >= last);
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst)          count <= '0;
    else if (!enable) count <= '0;
    else if (tick)    count <= '0;
    else              count <= count + 1'b1;
  end

endmodule
