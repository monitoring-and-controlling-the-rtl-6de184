// duty_adjust: push-button up/down register.
// Holds a value (the PWM duty of one channel, or the set speed) that moves
// by STEP on every step_en strobe while the up or the down button is held,
// and stops at 0 and at MAX.  Pressing both buttons changes nothing.  The
// 9-bit width and the start value 50 follow the reference design; the step,
// the limit and the update strobe (end of a PWM period in the top level)
// are this design's choices.
// Inputs up/down must already be synchronised.  value is registered and
// changes one clock after a step_en in which a button is held.
module duty_adjust #(
  parameter int unsigned W    = 9,
  parameter int unsigned INIT = 50,
  parameter int unsigned MAX  = 100,
  parameter int unsigned STEP = 1
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         step_en,
  input  logic         up,
  input  logic         down,
  output logic [W-1:0] value
);
  always_ff @(posedge clk) begin
    if (rst) begin
      value <= W'(INIT);
    end else if (step_en && up && !down) begin
      if (value <= W'(MAX - STEP)) value <= value + W'(STEP);
      else                         value <= W'(MAX);
    end else if (step_en && down && !up) begin
      if (value >= W'(STEP)) value <= value - W'(STEP);
      else                   value <= '0;
    end
  end

  initial assert (INIT <= MAX && MAX < (1 << W) && STEP >= 1 && STEP <= MAX)
    else $error("duty_adjust: inconsistent INIT/MAX/STEP");
endmodule
