// pwm_gen: PWM generator of one bridge channel.
// The running counter advances on every tick and wraps after PWM_STEPS
// ticks; the output is high while the counter is below the duty value, so
// duty = 50 with 100 steps gives a 50 % square wave and duty >= PWM_STEPS
// keeps the output high.  The comparison of the 11-bit counter with the
// zero-extended 9-bit duty, and the output register behind the comparator,
// follow the reference design; the 100-step period is this design's choice.
// Timing: pwm is registered, so it follows the counter by one clock.
// period_end is a one-cycle strobe in the clock where the counter wraps;
// the duty register is updated there so that each period uses one value.
module pwm_gen #(
  parameter int unsigned PWM_STEPS = 100,
  parameter int unsigned CNT_W     = 11,
  parameter int unsigned DUTY_W    = 9
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              tick,
  input  logic [DUTY_W-1:0] duty,
  output logic              pwm,
  output logic              period_end
);
  logic [CNT_W-1:0] running_pwm;
  logic             wrap;

  assign wrap       = tick && (running_pwm == CNT_W'(PWM_STEPS - 1));
  assign period_end = wrap;

  always_ff @(posedge clk) begin
    if (rst) begin
      running_pwm <= '0;
      pwm         <= 1'b0;
    end else begin
      if (wrap)       running_pwm <= '0;
      else if (tick)  running_pwm <= running_pwm + 1'b1;
      pwm <= (running_pwm < CNT_W'(duty));
    end
  end

  initial assert (PWM_STEPS >= 2 && PWM_STEPS <= (1 << CNT_W))
    else $error("pwm_gen: PWM_STEPS out of range for CNT_W");
endmodule
