// tb_pid_ctrl: random set speeds and measurements against an integer
// reference of the PID law (proportional, clamped integral, derivative,
// arithmetic shift by FRAC, output clamped to 0..OUT_MAX).  Checks the
// one-clock latency, that both output limits are reached, and that a low
// enable clears the controller.
module tb_pid_ctrl;
  localparam int KP = 13, KI = 26, KD = 64, FRAC = 8, IMAX = 8192, OMAX = 100;
  logic clk = 0, rst = 1, en = 0, sample = 0;
  logic [13:0] sp, meas;
  logic [8:0] duty;
  logic done;
  int checks = 0, failures = 0;
  longint integ = 0, eprev = 0;
  int sat_hi = 0, sat_lo = 0, mid = 0;

  pid_ctrl #(.KP(KP), .KI(KI), .KD(KD)) dut (
    .clk(clk), .rst(rst), .en(en), .sample(sample),
    .setpoint(sp), .measured(meas), .duty(duty), .done(done));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint floor_shift(longint a, int s);
    longint d = 1 << s;
    return (a >= 0) ? a / d : -((-a + d - 1) / d);
  endfunction

  task automatic one_sample(input int s, input int m);
    longint e, acc, u, expd;
    @(negedge clk);
    sp = 14'(s); meas = 14'(m); sample = 1;
    @(negedge clk);
    sample = 0;
    e = s - m;
    integ = integ + e;
    if (integ > IMAX) integ = IMAX;
    if (integ < -IMAX) integ = -IMAX;
    acc = KP * e + KI * integ + KD * (e - eprev);
    eprev = e;
    u = floor_shift(acc, FRAC);
    expd = (u < 0) ? 0 : (u > OMAX) ? OMAX : u;
    check(done, "done one clock after sample");
    check(duty == 9'(expd), $sformatf("sp %0d meas %0d: duty %0d expected %0d", s, m, duty, expd));
    if (expd == OMAX) sat_hi++; else if (expd == 0) sat_lo++; else mid++;
    @(negedge clk);
    check(!done, "done is one clock long");
  endtask

  initial begin
    sp = 0; meas = 0;
    repeat (3) @(posedge clk);
    rst = 0; en = 1;
    // small errors around a set point keep the output inside its range
    for (int i = 0; i < 300; i++) one_sample(500, 500 + $urandom_range(0, 40) - 20);
    // large positive then negative errors drive it to both limits
    for (int i = 0; i < 50; i++) one_sample(1000, $urandom_range(0, 200));
    for (int i = 0; i < 50; i++) one_sample(100, 900 + $urandom_range(0, 200));
    // random
    for (int i = 0; i < 500; i++) one_sample($urandom_range(0, 1100), $urandom_range(0, 1100));
    // disable clears everything
    @(negedge clk) en = 0;
    @(negedge clk);
    check(duty == 0 && !done, "disabled: duty 0");
    en = 1; integ = 0; eprev = 0;
    for (int i = 0; i < 20; i++) one_sample(600, 550);
    check(sat_hi > 0 && sat_lo > 0 && mid > 0, "upper limit, lower limit and linear range all exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
