// tb_dc_motor_ctrl_full: the controller at its default parameters (50 MHz
// clock, divider 5000, 100-step PWM, 1 s speed gate) with a motor model on
// channel A.  One complete operation: after reset both channels run at
// 50 % with a 10 ms PWM period; the motor spins up; the second speed
// reading (after 2 s) must match the model and the display; then the
// closed loop is switched on and its first PID update must produce the
// duty the PID law gives for the 500 rpm start set speed.
module tb_dc_motor_ctrl_full;
  import dcm_pkg::*;
  localparam int CLK_HZ = 50_000_000, PERIOD = 5000 * 100;
  localparam real RPM_FULL = 1095.0;

  logic clk = 0, rst = 1;
  logic closed_loop = 0, opto;
  logic in1, in2, in3, in4, ena, enb, dir_led, pid_update, rpm_valid;
  logic [RPM_W-1:0] rpm, set_rpm;
  logic [DUTY_W-1:0] duty_a, duty_b;
  seg7_t [3:0] seg;
  real speed;
  int checks = 0, failures = 0;

  dc_motor_ctrl_top dut (
    .clk(clk), .rst(rst), .dip_sw1(1'b1), .dip_sw2(1'b0),
    .p_b1(1'b0), .p_b2(1'b0), .p_b3(1'b0), .p_b4(1'b0),
    .closed_loop(closed_loop), .opto_in(opto),
    .in1(in1), .in2(in2), .in3(in3), .in4(in4), .ena(ena), .enb(enb),
    .rpm(rpm), .rpm_valid(rpm_valid), .set_rpm(set_rpm), .duty_a(duty_a), .duty_b(duty_b),
    .seg(seg), .dir_led(dir_led), .pid_update(pid_update));

  motor_model #(.CLK_HZ(CLK_HZ), .RPM_FULL(RPM_FULL), .TAU_S(0.2)) u_motor (
    .clk(clk), .en(ena), .in_a(in1), .in_b(in2), .opto(opto), .speed_rpm(speed));

  always #10 clk = ~clk;   // 50 MHz

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #4_000_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [6:0] table_s [10] = '{7'h3F, 7'h06, 7'h5B, 7'h4F, 7'h66, 7'h6D, 7'h7D, 7'h07, 7'h7F, 7'h6F};

  initial begin
    int ha, hb, x, e, u, expd;
    longint t0, t1;
    repeat (4) @(posedge clk);
    @(negedge clk) rst = 0;
    repeat (2 * PERIOD) @(posedge clk);
    ha = 0; hb = 0;
    repeat (PERIOD) begin
      @(posedge clk);
      ha += int'(ena); hb += int'(enb);
    end
    check(ha == PERIOD / 2 && hb == PERIOD / 2, $sformatf("50 %% duty: A %0d B %0d of %0d", ha, hb, PERIOD));
    check(in1 && !in2 && !in3 && in4 && dir_led, "direction outputs");

    // two speed readings, one second apart
    do @(posedge clk); while (!rpm_valid);
    t0 = $time;
    do @(posedge clk); while (!rpm_valid);
    t1 = $time;
    check(t1 - t0 == 64'd1_000_000_000, $sformatf("gate period %0d ns", t1 - t0));
    repeat (3) @(posedge clk);
    check(real'(rpm) > 0.5 * RPM_FULL - 70 && real'(rpm) < 0.5 * RPM_FULL + 70,
          $sformatf("speed at 50 %%: %0d rpm", rpm));
    x = int'(rpm);
    for (int k = 0; k < 4; k++) begin
      check(seg[k] == table_s[x % 10], $sformatf("display digit %0d", k));
      x /= 10;
    end

    // closed loop: first PID update from the next reading
    @(negedge clk) closed_loop = 1;
    do @(posedge clk); while (!pid_update);
    #1;
    e = 500 - int'(rpm);
    u = (13 * e + 26 * e);
    u = (u >= 0) ? u / 256 : -((-u + 255) / 256);
    expd = (u < 0) ? 0 : (u > 100) ? 100 : u;
    check(duty_a == 9'(expd), $sformatf("first PID duty %0d expected %0d (rpm %0d)", duty_a, expd, rpm));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
