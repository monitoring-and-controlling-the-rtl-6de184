// tb_speed_sweep: speed sweep from 100 to 1000 rpm in 100 rpm steps under
// closed-loop control, then full duty in open loop (about 1095 rpm), with
// the motor model on channel A.  Scaled time base as in the end-to-end
// test (100 kHz clock, divider 10, 1 s gate).  At each set speed the mean
// of four readings, after settling, must lie within one count (60 rpm) of
// the set speed, and the display must show each reading.
module tb_speed_sweep;
  import dcm_pkg::*;
  localparam int CLK_HZ = 100_000, DIV = 10, STEPS = 100, PERIOD = DIV * STEPS;
  localparam real RPM_FULL = 1095.0;

  logic clk = 0, rst = 1;
  logic p_b1 = 0, p_b2 = 0, closed_loop = 1, opto;
  logic in1, in2, in3, in4, ena, enb, dir_led, pid_update, rpm_valid;
  logic [RPM_W-1:0] rpm, set_rpm;
  logic [DUTY_W-1:0] duty_a, duty_b;
  seg7_t [3:0] seg;
  real speed;
  int checks = 0, failures = 0, points = 0;
  logic [6:0] table_s [10] = '{7'h3F, 7'h06, 7'h5B, 7'h4F, 7'h66, 7'h6D, 7'h7D, 7'h07, 7'h7F, 7'h6F};

  dc_motor_ctrl_top #(.CLK_HZ(CLK_HZ), .DIV(DIV), .GATE_CYCLES(CLK_HZ)) dut (
    .clk(clk), .rst(rst), .dip_sw1(1'b1), .dip_sw2(1'b1),
    .p_b1(p_b1), .p_b2(p_b2), .p_b3(1'b0), .p_b4(1'b0),
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
    #300_000_000;   // 30 M clocks
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic hold(ref logic btn, input int n);
    @(negedge clk) btn = 1;
    repeat (n * PERIOD) @(posedge clk);
    @(negedge clk) btn = 0;
    repeat (4) @(posedge clk);
  endtask

  task automatic mean_rpm(input int settle, input int n, output real avg);
    int x;
    avg = 0.0;
    for (int i = 0; i < settle + n; i++) begin
      do @(posedge clk); while (!rpm_valid);
      repeat (3) @(posedge clk);
      x = (rpm > 9999) ? 9999 : int'(rpm);
      for (int k = 0; k < 4; k++) begin
        check(seg[k] == table_s[x % 10], $sformatf("display digit %0d of %0d", k, rpm));
        x /= 10;
      end
      if (i >= settle) avg += real'(rpm);
    end
    avg /= n;
  endtask

  initial begin
    real avg;
    repeat (4) @(posedge clk);
    @(negedge clk) rst = 0;
    repeat (5) @(posedge clk);
    hold(p_b2, 40);                          // 500 -> 100 rpm
    for (int sp = 100; sp <= 1000; sp += 100) begin
      check(set_rpm == 14'(sp), $sformatf("set speed %0d expected %0d", set_rpm, sp));
      mean_rpm(8, 4, avg);
      $display("set %4d rpm  measured mean %7.1f rpm  duty %0d", sp, avg, duty_a);
      check(avg >= sp - 60 && avg <= sp + 60, $sformatf("set %0d: mean %0.1f", sp, avg));
      points++;
      if (sp < 1000) hold(p_b1, 10);         // +100 rpm
    end
    // full duty, open loop: the top of the linear range
    @(negedge clk) closed_loop = 0;
    hold(p_b1, 60);                          // 50 -> 100 %
    check(duty_a == 100, "full duty");
    mean_rpm(3, 4, avg);
    $display("open loop 100 %%  measured mean %7.1f rpm", avg);
    check(avg >= RPM_FULL - 60 && avg <= RPM_FULL + 60, $sformatf("full speed mean %0.1f", avg));
    check(points == 10, "all ten speed points run");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
