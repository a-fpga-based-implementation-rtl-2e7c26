// motor_ctrl: motor controller (sequence generator) of the infusion-controller
// hardware. It drives the four phase lines of the stepper motor that presses
// the drip-feed hose.
//
// The motor position is kept as a two-bit index into the four-entry phase
// pattern table of ivics_pkg. Each clock with step high moves the index one
// place: up for dir = 0 (patterns 0110, 1100, 1001, 0011, 0110, ...) and down
// for dir = 1 (0110, 0011, 1001, 1100, 0110, ...). With step low the lines
// hold, so the motor keeps its torque. motor changes on the clock edge at
// which step is high. Reset puts the motor at pattern 0110.
// The two sequences follow the original design. Keeping an index instead of
// the raw pattern means an illegal pattern cannot occur, so the original's
// fall-back to an initial pattern is not needed; the reset pattern is this
// design's own choice.
module motor_ctrl
  import ivics_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       step,   // advance one step this clock (CK_MOTOR)
  input  logic       dir,    // DIRECTION from the instruction register
  output logic [3:0] motor   // phase lines to the motor driver
);

  phase_idx_t idx;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    idx <= '0;
    else if (step) idx <= next_phase(idx, dir);
  end

  assign motor = phase_pattern(idx);

endmodule
