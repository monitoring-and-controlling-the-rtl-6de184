// tb_speed_meter: a 1000 Hz time base and a 1 s gate, so one pulse per
// gate is 60 rpm.  Each gate gets a random number of sensor pulses, placed
// away from the gate edges; the strobe must come every gate and carry
// 60 * pulses.  A second instance with two pulses per revolution and a
// half-second gate must report the same speed for the same pulse train
// spread over two of its gates.  A third with a 6-bit result checks
// saturation.
module tb_speed_meter;
  localparam int GATE = 1000;
  logic clk = 0, rst = 1, opto = 0;
  logic [13:0] rpm, rpm2;
  logic [5:0]  rpm3;
  logic valid, valid2, valid3;
  int checks = 0, failures = 0;
  int sent[$];

  speed_meter #(.CLK_HZ(1000), .GATE_CYCLES(GATE)) u1 (
    .clk(clk), .rst(rst), .opto_in(opto), .rpm(rpm), .valid(valid));
  speed_meter #(.CLK_HZ(1000), .GATE_CYCLES(GATE), .PPR(1), .RPM_W(6)) u3 (
    .clk(clk), .rst(rst), .opto_in(opto), .rpm(rpm3), .valid(valid3));
  speed_meter #(.CLK_HZ(1000), .GATE_CYCLES(GATE / 2), .PPR(2)) u2 (
    .clk(clk), .rst(rst), .opto_in(opto), .rpm(rpm2), .valid(valid2));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // stimulus: gate g covers clocks g*GATE .. g*GATE+GATE-1 after reset
  initial begin
    int n;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int g = 0; g < 40; g++) begin
      n = (g == 0) ? 0 : (g == 1) ? 19 : $urandom_range(0, 19);
      sent.push_back(n);
      // pulses of 10 clocks high, 40 apart, from clock 20 on
      for (int c = 0; c < GATE; c++) begin
        opto = (c >= 20) && ((c - 20) % 40 < 10) && ((c - 20) / 40 < n);
        @(negedge clk);
      end
    end
  end

  // check the 1 s instance and the saturating one
  longint cyc = 0, last_v = 0;
  int g1 = 0, ppr_pairs = 0, sat_seen = 0;
  always @(posedge clk) if (!rst) cyc++;
  always @(posedge clk) if (!rst && valid) begin
    if (g1 > 0) check(cyc - last_v == GATE, $sformatf("strobe spacing %0d", cyc - last_v));
    last_v = cyc;
    #1;
    if (g1 < sent.size()) begin
      check(rpm == 14'(60 * sent[g1]), $sformatf("gate %0d rpm %0d expected %0d", g1, rpm, 60 * sent[g1]));
      check(rpm3 == ((60 * sent[g1] > 63) ? 6'd63 : 6'(60 * sent[g1])), "saturated result");
      if (60 * sent[g1] > 63) sat_seen++;
    end
    g1++;
  end

  // the half-second gate with 2 pulses per revolution: rpm = 60 * pulses
  // per half second; pulses in the first half of each 1 s gate lie in
  // clocks 20..799, so the count per half gate is known from n
  int h = 0;
  always @(posedge clk) if (!rst && valid2) begin
    int n, first, second;
    #1;
    if (h / 2 < sent.size()) begin
      n = sent[h / 2];
      first  = (n < 12) ? n : 12;
      second = n - first;
      check(rpm2 == 14'(60 * ((h % 2 == 0) ? first : second)),
            $sformatf("half gate %0d rpm %0d", h, rpm2));
    end
    h++;
  end

  initial begin
    wait (g1 == 40);
    check(sat_seen > 0, "saturation never exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
