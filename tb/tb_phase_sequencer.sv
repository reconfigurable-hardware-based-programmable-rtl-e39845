// tb_phase_sequencer: self-checking test of the four-phase code generator.
//
// The expected coil patterns come from the stepping code written out here
// (A,9,5,6 clockwise, the same ring walked backwards counter-clockwise) and
// a position kept by the testbench. Checked: all coils off after reset, the
// new pattern one cycle after each step pulse, the pattern held between
// steps, direction reversals continuing from the current pattern, and a
// reset in the middle of a sequence.
module tb_phase_sequencer;
  import stepper_pkg::*;

  logic       clk = 1'b0;
  logic       rst = 1'b1;
  logic       step = 1'b0;
  dir_e       dir = DIR_CW;
  logic [3:0] phases;

  int checks = 0, failures = 0;
  int pos = 0;  // testbench's own position in the ring
  logic [3:0] ring [4] = '{4'b1010, 4'b1001, 4'b0101, 4'b0110};

  always #5 clk = ~clk;

  phase_sequencer dut (.clk(clk), .rst(rst), .step(step), .dir(dir), .phases(phases));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // One step pulse, then the output must show the next pattern.
  task automatic do_step(input dir_e d);
    logic [3:0] prev_pat;
    @(negedge clk);
    prev_pat = phases;
    dir  = d;
    step = 1'b1;
    @(negedge clk);
    step = 1'b0;
    pos  = (d == DIR_CW) ? (pos + 1) % 4 : (pos + 3) % 4;
    check(phases == ring[pos], $sformatf("after %s step: got %h expected %h",
                                         d == DIR_CW ? "CW" : "CCW", phases, ring[pos]));
    check(phases != prev_pat, "pattern did not change on a step");
  endtask

  task automatic idle_check(input int n);
    logic [3:0] held;
    held = phases;
    repeat (n) begin
      @(negedge clk);
      dir = dir_e'($urandom_range(1));
      check(phases == held, "pattern changed without a step");
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    check(phases == 4'b0000, "coils not off in reset");
    rst = 1'b0;
    idle_check(5);
    check(phases == 4'b0000, "coils energized prev_pat the first step");

    // Clockwise: 9,5,6,A,9,...
    repeat (9) do_step(DIR_CW);
    idle_check(7);
    // Counter-clockwise from wherever it stands.
    repeat (9) do_step(DIR_CCW);
    // Random directions.
    repeat (60) begin
      do_step(dir_e'($urandom_range(1)));
      if ($urandom_range(3) == 0) idle_check($urandom_range(1, 4));
    end

    // Asynchronous clear in the middle of a sequence.
    #2 rst = 1'b1;
    #1 check(phases == 4'b0000, "asynchronous clear did not clear the coils");
    @(negedge clk);
    rst = 1'b0;
    pos = 0;
    repeat (3) do_step(DIR_CCW);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
