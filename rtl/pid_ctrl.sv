// pid_ctrl: discrete PID speed controller.
// On every new speed measurement (sample strobe) it forms
//     e[k] = setpoint - measured
//     I[k] = clamp(I[k-1] + e[k])
//     u[k] = (KP*e[k] + KI*I[k] + KD*(e[k] - e[k-1])) >>> FRAC
// and clamps u to 0..OUT_MAX, the duty range of the PWM generator.  The
// gains are fixed-point numbers with FRAC fraction bits (KP = 13 is about
// 0.05 duty steps per rpm).  A PID between the speed measurement and the
// PWM generator follows the reference design; the gains, number format,
// saturation and anti-windup (the integrator is held within +/-IMAX) are
// this design's choices.  While en is low the integrator and the previous
// error are cleared and duty is 0.
// Timing: duty and done are registered one clock after sample.
module pid_ctrl #(
  parameter int unsigned SP_W    = 14,
  parameter int unsigned OUT_W   = 9,
  parameter int unsigned OUT_MAX = 100,
  parameter int          KP      = 13,
  parameter int          KI      = 26,
  parameter int          KD      = 0,
  parameter int unsigned FRAC    = 8,
  parameter int          IMAX    = 8192
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             en,
  input  logic             sample,
  input  logic [SP_W-1:0]  setpoint,
  input  logic [SP_W-1:0]  measured,
  output logic [OUT_W-1:0] duty,
  output logic             done
);
  localparam int EW = SP_W + 1;   // error width
  localparam int AW = 48;         // accumulator width

  logic signed [EW-1:0] err, err_prev;
  logic signed [31:0]   integ, integ_next, integ_sum;
  logic signed [AW-1:0] acc, u;

  always_comb begin
    err       = $signed({1'b0, setpoint}) - $signed({1'b0, measured});
    integ_sum = integ + 32'(err);
    if (integ_sum > IMAX)        integ_next = IMAX;
    else if (integ_sum < -IMAX)  integ_next = -IMAX;
    else                         integ_next = integ_sum;
    acc = AW'(KP) * AW'(err)
        + AW'(KI) * AW'(integ_next)
        + AW'(KD) * (AW'(err) - AW'(err_prev));
    u   = acc >>> FRAC;
  end

  always_ff @(posedge clk) begin
    if (rst || !en) begin
      err_prev <= '0;
      integ    <= '0;
      duty     <= '0;
      done     <= 1'b0;
    end else begin
      done <= sample;
      if (sample) begin
        err_prev <= err;
        integ    <= integ_next;
        if (u < 0)                   duty <= '0;
        else if (u > AW'(OUT_MAX))   duty <= OUT_W'(OUT_MAX);
        else                         duty <= OUT_W'(u);
      end
    end
  end

  initial assert (OUT_MAX < (1 << OUT_W)) else $error("pid_ctrl: OUT_MAX too wide");
endmodule
