// dc_motor_ctrl_top: FPGA controller for DC motors on a dual H-bridge.
// Two bridge channels, A (IN1, IN2, ENA) and B (IN3, IN4, ENB), each get
// a direction from a DIP switch and a PWM on the enable pin whose duty is
// moved up and down with a pair of push buttons (P_B1/P_B2 for A,
// P_B3/P_B4 for B), as in the reference board design.  Channel A also
// carries the speed loop: an opto-interrupter on its shaft is counted into
// rpm, shown on four 7-segment digits together with a direction LED, and,
// with the closed_loop switch set, a PID controller sets the duty of A so
// that the measured speed follows a set speed, which the P_B1/P_B2 buttons
// then move in steps of SP_STEP rpm.  With closed_loop clear, channel A is
// the plain push-button PWM drive.  The closed_loop switch, the button
// assignment and the closed loop on channel A only are this design's
// choices.
// Timing: one clock domain (clk, 50 MHz by default).  A tick every DIV
// clocks advances both PWM counters; a PWM period is PWM_STEPS ticks
// (10 ms with the defaults); buttons act once per PWM period while held;
// a speed measurement and a PID update happen every GATE_CYCLES clocks.
// rst is synchronous and active high.  rpm_valid marks each new speed
// reading (for a logging host); pid_update marks each new PID duty.
module dc_motor_ctrl_top
  import dcm_pkg::*;
#(
  parameter int unsigned CLK_HZ      = CLK_HZ_DEF,
  parameter int unsigned DIV         = DIV_DEF,
  parameter int unsigned PWM_STEPS   = PWM_STEPS_DEF,
  parameter int unsigned GATE_CYCLES = CLK_HZ_DEF,
  parameter int unsigned PPR         = 1,
  parameter int unsigned SP_INIT     = 500,
  parameter int unsigned SP_MAX      = 1000,
  parameter int unsigned SP_STEP     = 10,
  parameter int          KP          = 13,
  parameter int          KI          = 26,
  parameter int          KD          = 0
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    dip_sw1,
  input  logic                    dip_sw2,
  input  logic                    p_b1,
  input  logic                    p_b2,
  input  logic                    p_b3,
  input  logic                    p_b4,
  input  logic                    closed_loop,
  input  logic                    opto_in,
  output logic                    in1,
  output logic                    in2,
  output logic                    in3,
  output logic                    in4,
  output logic                    ena,
  output logic                    enb,
  output logic [RPM_W-1:0]        rpm,
  output logic                    rpm_valid,
  output logic [RPM_W-1:0]        set_rpm,
  output logic [DUTY_W-1:0]       duty_a,
  output logic [DUTY_W-1:0]       duty_b,
  output seg7_t [3:0]             seg,
  output logic                    dir_led,
  output logic                    pid_update
);
  logic tick;
  logic b1, b2, b3, b4, cl;
  logic end_a, end_b;
  logic [DUTY_W-1:0] count_pwm1, count_pwm2, pid_duty;
  dir_e dir_a;

  tick_gen #(.DIV(DIV)) u_tick (.clk(clk), .rst(rst), .tick(tick));

  sync2 u_s1 (.clk(clk), .rst(rst), .d(p_b1),        .q(b1));
  sync2 u_s2 (.clk(clk), .rst(rst), .d(p_b2),        .q(b2));
  sync2 u_s3 (.clk(clk), .rst(rst), .d(p_b3),        .q(b3));
  sync2 u_s4 (.clk(clk), .rst(rst), .d(p_b4),        .q(b4));
  sync2 u_sc (.clk(clk), .rst(rst), .d(closed_loop), .q(cl));

  // ---- channel A: buttons move the duty (open loop) or the set speed
  duty_adjust #(.W(DUTY_W), .INIT(50), .MAX(PWM_STEPS), .STEP(1)) u_duty1 (
    .clk(clk), .rst(rst), .step_en(end_a), .up(b1 && !cl), .down(b2 && !cl),
    .value(count_pwm1));

  duty_adjust #(.W(RPM_W), .INIT(SP_INIT), .MAX(SP_MAX), .STEP(SP_STEP)) u_setp (
    .clk(clk), .rst(rst), .step_en(end_a), .up(b1 && cl), .down(b2 && cl),
    .value(set_rpm));

  speed_meter #(.CLK_HZ(CLK_HZ), .GATE_CYCLES(GATE_CYCLES), .PPR(PPR), .RPM_W(RPM_W)) u_speed (
    .clk(clk), .rst(rst), .opto_in(opto_in), .rpm(rpm), .valid(rpm_valid));

  pid_ctrl #(.SP_W(RPM_W), .OUT_W(DUTY_W), .OUT_MAX(PWM_STEPS),
             .KP(KP), .KI(KI), .KD(KD)) u_pid (
    .clk(clk), .rst(rst), .en(cl), .sample(rpm_valid),
    .setpoint(set_rpm), .measured(rpm), .duty(pid_duty), .done(pid_update));

  assign duty_a = cl ? pid_duty : count_pwm1;

  pwm_gen #(.PWM_STEPS(PWM_STEPS), .DUTY_W(DUTY_W)) u_pwm1 (
    .clk(clk), .rst(rst), .tick(tick), .duty(duty_a), .pwm(ena), .period_end(end_a));

  dir_ctrl u_dir1 (.clk(clk), .rst(rst), .dir_sw(dip_sw1), .in_a(in1), .in_b(in2), .dir(dir_a));

  // ---- channel B: push-button PWM drive
  duty_adjust #(.W(DUTY_W), .INIT(50), .MAX(PWM_STEPS), .STEP(1)) u_duty2 (
    .clk(clk), .rst(rst), .step_en(end_b), .up(b3), .down(b4), .value(count_pwm2));

  assign duty_b = count_pwm2;

  pwm_gen #(.PWM_STEPS(PWM_STEPS), .DUTY_W(DUTY_W)) u_pwm2 (
    .clk(clk), .rst(rst), .tick(tick), .duty(duty_b), .pwm(enb), .period_end(end_b));

  dir_ctrl u_dir2 (.clk(clk), .rst(rst), .dir_sw(dip_sw2), .in_a(in3), .in_b(in4), .dir());

  // ---- display of channel A's speed and direction
  seven_seg_display #(.W(RPM_W), .DIGITS(4)) u_disp (
    .clk(clk), .rst(rst), .value(rpm), .dir(dir_a), .seg(seg), .dir_led(dir_led));

endmodule
