// tb_pwm_gen: drives the PWM generator with a tick every third clock and
// checks, for a set of duty values, the period length (PWM_STEPS ticks) and
// the number of clocks the output is high in a period (duty ticks,
// saturating at the full period).  Run with the default 100 steps and with
// 10 steps.
module tb_pwm_gen;
  localparam int TD = 3;
  logic clk = 0, rst = 1, tick;
  logic [8:0] duty_a, duty_b;
  logic pwm_a, end_a, pwm_b, end_b;
  int checks = 0, failures = 0;
  int tdiv = 0;

  pwm_gen                    u_a (.clk(clk), .rst(rst), .tick(tick), .duty(duty_a), .pwm(pwm_a), .period_end(end_a));
  pwm_gen #(.PWM_STEPS(10))  u_b (.clk(clk), .rst(rst), .tick(tick), .duty(duty_b), .pwm(pwm_b), .period_end(end_b));

  always #5 clk = ~clk;
  assign tick = (tdiv == TD - 1);
  always @(posedge clk) tdiv <= (rst || tdiv == TD - 1) ? 0 : tdiv + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #20_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // measure one full period of a channel: clocks between strobes, high clocks
  task automatic measure(input bit ch, output int period, output int high);
    period = 0; high = 0;
    do @(posedge clk); while (!(ch ? end_b : end_a));
    do begin
      @(posedge clk);
      period++;
      if (ch ? pwm_b : pwm_a) high++;
    end while (!(ch ? end_b : end_a));
  endtask

  initial begin
    int p, h, exp;
    int da[] = '{0, 1, 37, 50, 99, 100, 200};
    int db[] = '{0, 1, 5, 9, 10, 11};
    duty_a = 50; duty_b = 5;
    repeat (3) @(posedge clk);
    rst <= 0;
    foreach (da[i]) begin
      duty_a = 9'(da[i]);
      measure(0, p, h);          // settle one period
      measure(0, p, h);
      exp = (da[i] > 100 ? 100 : da[i]) * TD;
      check(p == 100 * TD, $sformatf("A period %0d", p));
      check(h == exp, $sformatf("A duty %0d: high %0d expected %0d", da[i], h, exp));
    end
    foreach (db[i]) begin
      duty_b = 9'(db[i]);
      measure(1, p, h);
      measure(1, p, h);
      exp = (db[i] > 10 ? 10 : db[i]) * TD;
      check(p == 10 * TD, $sformatf("B period %0d", p));
      check(h == exp, $sformatf("B duty %0d: high %0d expected %0d", db[i], h, exp));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
