// tb_dc_motor_ctrl_top: end-to-end test of the motor controller with a
// motor model on channel A.  The time base is scaled (CLK_HZ = 100 kHz,
// divider 10, so a PWM period is 1000 clocks = 10 ms and the speed gate
// 1 s = 100000 clocks); all other settings are the defaults.
// It walks through: reset state and 50 % PWM on both channels; button
// steps up and down with both clamps; direction changes on both channels;
// an open-loop speed reading against the motor model; the closed loop
// settling on the start set speed; set-speed changes by button; and the
// switch back to open loop.  Each mechanism is counted and must occur.
module tb_dc_motor_ctrl_top;
  import dcm_pkg::*;
  localparam int CLK_HZ = 100_000, DIV = 10, STEPS = 100, PERIOD = DIV * STEPS;
  localparam real RPM_FULL = 1095.0;

  logic clk = 0, rst = 1;
  logic dip_sw1 = 1, dip_sw2 = 0, p_b1 = 0, p_b2 = 0, p_b3 = 0, p_b4 = 0;
  logic closed_loop = 0, opto;
  logic in1, in2, in3, in4, ena, enb, dir_led, pid_update, rpm_valid;
  logic [RPM_W-1:0] rpm, set_rpm;
  logic [DUTY_W-1:0] duty_a, duty_b;
  seg7_t [3:0] seg;
  real speed;
  int checks = 0, failures = 0;

  dc_motor_ctrl_top #(.CLK_HZ(CLK_HZ), .DIV(DIV), .GATE_CYCLES(CLK_HZ)) dut (
    .clk(clk), .rst(rst), .dip_sw1(dip_sw1), .dip_sw2(dip_sw2),
    .p_b1(p_b1), .p_b2(p_b2), .p_b3(p_b3), .p_b4(p_b4),
    .closed_loop(closed_loop), .opto_in(opto),
    .in1(in1), .in2(in2), .in3(in3), .in4(in4), .ena(ena), .enb(enb),
    .rpm(rpm), .rpm_valid(rpm_valid), .set_rpm(set_rpm), .duty_a(duty_a), .duty_b(duty_b),
    .seg(seg), .dir_led(dir_led), .pid_update(pid_update));

  motor_model #(.CLK_HZ(CLK_HZ), .RPM_FULL(RPM_FULL), .TAU_S(0.2)) u_motor (
    .clk(clk), .en(ena), .in_a(in1), .in_b(in2), .opto(opto), .speed_rpm(speed));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100_000_000;   // 10 M clocks
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- mechanism counters
  int n_up_a = 0, n_down_a = 0, n_clamp_min = 0, n_clamp_max = 0, n_up_b = 0;
  int n_dir_a = 0, n_dir_b = 0, n_meas = 0, n_pid = 0, n_pid_sat = 0;
  int n_mode = 0, n_sp_up = 0, n_sp_down = 0, n_disp = 0;
  logic [DUTY_W-1:0] pa, pb;
  logic [RPM_W-1:0] psp;
  logic pin1, pin3, pcl;
  seg7_t [3:0] pseg;
  always @(posedge clk) if (!rst) begin
    if (!closed_loop && !pcl) begin
      if (duty_a > pa) n_up_a++;
      if (duty_a < pa) n_down_a++;
    end
    if (p_b2 && !closed_loop && duty_a == 0 && pa == 0) n_clamp_min++;
    if (p_b3 && duty_b == STEPS && pb == STEPS) n_clamp_max++;
    if (duty_b > pb) n_up_b++;
    if (in1 != pin1) n_dir_a++;
    if (in3 != pin3) n_dir_b++;
    if (rpm_valid) n_meas++;
    if (pid_update) begin
      n_pid++;
      if (duty_a == STEPS || duty_a == 0) n_pid_sat++;
    end
    if (closed_loop != pcl) n_mode++;
    if (set_rpm > psp) n_sp_up++;
    if (set_rpm < psp) n_sp_down++;
    if (seg != pseg) n_disp++;
    pa <= duty_a; pb <= duty_b; psp <= set_rpm; pin1 <= in1; pin3 <= in3;
    pcl <= closed_loop; pseg <= seg;
  end

  // ---------------- helpers
  // high clocks of ena/enb over one full PWM period (any aligned window)
  task automatic pwm_high(output int ha, output int hb);
    ha = 0; hb = 0;
    repeat (PERIOD) begin
      @(posedge clk);
      ha += int'(ena); hb += int'(enb);
    end
  endtask

  // hold a button for n PWM periods: any window of n periods holds
  // exactly n period-end strobes, so the register moves n steps
  task automatic hold(ref logic btn, input int n);
    @(negedge clk) btn = 1;
    repeat (n * PERIOD) @(posedge clk);
    @(negedge clk) btn = 0;
    repeat (4) @(posedge clk);
  endtask

  task automatic wait_meas(input int n);
    repeat (n) begin
      do @(posedge clk); while (!rpm_valid);
    end
    repeat (3) @(posedge clk);
  endtask

  logic [6:0] table_s [10] = '{7'h3F, 7'h06, 7'h5B, 7'h4F, 7'h66, 7'h6D, 7'h7D, 7'h07, 7'h7F, 7'h6F};
  task automatic check_display();
    int x = (rpm > 9999) ? 9999 : int'(rpm);
    for (int k = 0; k < 4; k++) begin
      check(seg[k] == table_s[x % 10], $sformatf("display digit %0d for %0d rpm", k, rpm));
      x /= 10;
    end
    check(dir_led == dip_sw1, "direction LED");
  endtask

  // average of n speed readings
  task automatic avg_rpm(input int n, output real avg);
    avg = 0.0;
    repeat (n) begin
      wait_meas(1);
      avg += real'(rpm);
      check_display();
    end
    avg /= n;
  endtask

  initial begin
    int ha, hb;
    real avg, expect_rpm;
    repeat (4) @(posedge clk);
    @(negedge clk) rst = 0;
    repeat (3 * PERIOD) @(posedge clk);

    // ---- reset state: 50 % on both channels, directions from switches
    pwm_high(ha, hb);
    check(ha == 50 * DIV && hb == 50 * DIV, $sformatf("reset duty: A %0d B %0d clocks high", ha, hb));
    check(in1 && !in2 && !in3 && in4, "direction outputs after reset");
    check(duty_a == 50 && duty_b == 50 && set_rpm == 500, "reset registers");

    // ---- open-loop buttons on channel A: +20, then down to the 0 clamp
    hold(p_b1, 20);
    check(duty_a == 70, $sformatf("A duty after 20 up steps: %0d", duty_a));
    pwm_high(ha, hb);
    check(ha == 70 * DIV, $sformatf("A high clocks %0d at 70", ha));
    hold(p_b2, 80);
    check(duty_a == 0, $sformatf("A clamps at 0: %0d", duty_a));
    pwm_high(ha, hb);
    check(ha == 0, "A output off at duty 0");
    check(set_rpm == 500, "set speed untouched in open loop");

    // ---- channel B up to the 100 % clamp, then down 30
    hold(p_b3, 60);
    check(duty_b == 100, $sformatf("B clamps at 100: %0d", duty_b));
    pwm_high(ha, hb);
    check(hb == PERIOD, "B output always on at 100 %");
    hold(p_b4, 30);
    check(duty_b == 70, $sformatf("B after 30 down steps: %0d", duty_b));

    // ---- open-loop speed: A to 60 %, let the motor settle, read speed
    hold(p_b1, 60);
    check(duty_a == 60, $sformatf("A duty 60: %0d", duty_a));
    wait_meas(2);
    avg_rpm(2, avg);
    expect_rpm = 0.60 * RPM_FULL;
    check(avg > expect_rpm - 70 && avg < expect_rpm + 70,
          $sformatf("open-loop speed %0.1f rpm, motor model %0.1f", avg, expect_rpm));

    // ---- direction changes
    @(negedge clk) dip_sw1 = 0; dip_sw2 = 1;
    repeat (5) @(posedge clk);
    check(!in1 && in2 && in3 && !in4, "reversed directions");
    check(dir_led == 0, "direction LED follows channel A");
    wait_meas(2);
    check(speed < -0.5 * RPM_FULL, $sformatf("motor reversed: %0.1f", speed));
    avg_rpm(1, avg);
    check(avg > expect_rpm - 70 && avg < expect_rpm + 70, $sformatf("reverse speed magnitude %0.1f", avg));
    @(negedge clk) dip_sw1 = 1;

    // ---- closed loop on the start set speed (500 rpm)
    @(negedge clk) closed_loop = 1;
    wait_meas(10);
    avg_rpm(4, avg);
    check(avg > 500 - 60 && avg < 500 + 60, $sformatf("closed loop at 500: %0.1f rpm", avg));

    // ---- set speed up to 800 and down to 300 by buttons
    hold(p_b1, 30);
    check(set_rpm == 800, $sformatf("set speed %0d", set_rpm));
    wait_meas(10);
    avg_rpm(4, avg);
    check(avg > 800 - 60 && avg < 800 + 60, $sformatf("closed loop at 800: %0.1f rpm", avg));
    hold(p_b2, 50);
    check(set_rpm == 300, $sformatf("set speed %0d", set_rpm));
    wait_meas(10);
    avg_rpm(4, avg);
    check(avg > 300 - 60 && avg < 300 + 60, $sformatf("closed loop at 300: %0.1f rpm", avg));

    // ---- back to open loop: channel A returns to its button duty
    @(negedge clk) closed_loop = 0;
    repeat (5) @(posedge clk);
    check(duty_a == 60, $sformatf("open-loop duty restored: %0d", duty_a));

    $display("mechanisms: up_a=%0d down_a=%0d clamp_min=%0d clamp_max=%0d up_b=%0d dir_a=%0d dir_b=%0d meas=%0d pid=%0d pid_sat=%0d mode=%0d sp_up=%0d sp_down=%0d disp=%0d",
             n_up_a, n_down_a, n_clamp_min, n_clamp_max, n_up_b, n_dir_a, n_dir_b, n_meas, n_pid, n_pid_sat,
             n_mode, n_sp_up, n_sp_down, n_disp);
    check(n_up_a > 0,      "no duty step up on A");
    check(n_down_a > 0,    "no duty step down on A");
    check(n_clamp_min > 0, "lower duty clamp never hit");
    check(n_clamp_max > 0, "upper duty clamp never hit");
    check(n_up_b > 0,      "no duty step on B");
    check(n_dir_a > 0,     "no direction change on A");
    check(n_dir_b > 0,     "no direction change on B");
    check(n_meas > 0,      "no speed measurement");
    check(n_pid > 0,       "no PID update");
    check(n_pid_sat > 0,   "PID output never saturated");
    check(n_mode >= 2,     "mode switch not exercised both ways");
    check(n_sp_up > 0 && n_sp_down > 0, "set speed not moved both ways");
    check(n_disp > 0,      "display never changed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
