// motor_model: behavioural model of one DC motor on one bridge channel,
// with a slotted disc and opto-interrupter on its shaft.  Not synthesizable.
// The mean armature voltage is the bridge enable (PWM) times the supply;
// the direction comes from IN_A/IN_B (both equal: no drive).  The speed
// follows the applied voltage with a first-order lag of time constant
// TAU_S (the electrical time constant L/R is neglected against the
// mechanical one), reaching RPM_FULL at 100 % duty.  The shaft angle is
// integrated and the sensor output is high for the first half of each of
// the PPR slots of a turn.  Time advances by 1/CLK_HZ per clock, so the
// model runs on the same scaled time base as the controller under test.
module motor_model #(
  parameter int  CLK_HZ   = 100_000,
  parameter real RPM_FULL = 1095.0,
  parameter real TAU_S    = 0.2,
  parameter int  PPR      = 1
) (
  input  logic clk,
  input  logic en,
  input  logic in_a,
  input  logic in_b,
  output logic opto,
  output real  speed_rpm     // signed: positive when IN_A drives
);
  real angle_rev = 0.0;      // magnitude of turns, fractional part used
  real dt, drive, frac;

  initial begin
    speed_rpm = 0.0;
    opto = 1'b0;
    dt = 1.0 / CLK_HZ;
  end

  always @(posedge clk) begin
    drive = 0.0;
    if (en && in_a && !in_b) drive = RPM_FULL;
    if (en && in_b && !in_a) drive = -RPM_FULL;
    speed_rpm = speed_rpm + (drive - speed_rpm) * dt / TAU_S;
    angle_rev = angle_rev + ((speed_rpm < 0) ? -speed_rpm : speed_rpm) / 60.0 * dt;
    if (angle_rev >= 1.0e6) angle_rev = angle_rev - 1.0e6;
    frac = angle_rev * PPR - $floor(angle_rev * PPR);
    opto <= (frac < 0.5);
  end
endmodule
