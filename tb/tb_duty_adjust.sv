// tb_duty_adjust: random button and strobe patterns against a reference
// model of the clamped up/down register, for the duty configuration
// (9 bit, start 50, limit 100, step 1) and a set-speed configuration
// (14 bit, start 500, limit 1000, step 10).  Long presses reach both
// limits; hits of each limit are counted and must occur.
module tb_duty_adjust;
  logic clk = 0, rst = 1;
  logic step_en, up, down;
  logic [8:0]  v1;
  logic [13:0] v2;
  int checks = 0, failures = 0;
  int m1, m2, hit_max = 0, hit_min = 0;

  duty_adjust u1 (.clk(clk), .rst(rst), .step_en(step_en), .up(up), .down(down), .value(v1));
  duty_adjust #(.W(14), .INIT(500), .MAX(1000), .STEP(10)) u2 (
    .clk(clk), .rst(rst), .step_en(step_en), .up(up), .down(down), .value(v2));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int model(int v, int mx, int st, bit s, bit u, bit d);
    if (s && u && !d) return (v + st > mx) ? mx : v + st;
    if (s && d && !u) return (v - st < 0) ? 0 : v - st;
    return v;
  endfunction

  initial begin
    #5_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    step_en = 0; up = 0; down = 0;
    repeat (2) @(posedge clk);
    rst <= 0;
    m1 = 50; m2 = 500;
    @(negedge clk);
    check(v1 == 50 && v2 == 500, "reset values");
    for (int phase = 0; phase < 6; phase++) begin
      for (int i = 0; i < 3000; i++) begin
        @(negedge clk);
        step_en = ($urandom_range(0, 3) == 0);
        case (phase)
          0, 3: begin up = 1; down = ($urandom_range(0, 9) == 0); end  // mostly up
          1, 4: begin down = 1; up = ($urandom_range(0, 9) == 0); end  // mostly down
          default: begin up = $urandom_range(0, 1); down = $urandom_range(0, 1); end
        endcase
        @(posedge clk);
        m1 = model(m1, 100, 1, step_en, up, down);
        m2 = model(m2, 1000, 10, step_en, up, down);
        #1;
        check(v1 == 9'(m1), $sformatf("duty reg %0d expected %0d", v1, m1));
        check(v2 == 14'(m2), $sformatf("set-speed reg %0d expected %0d", v2, m2));
        if (v1 == 100) hit_max++;
        if (v1 == 0)   hit_min++;
      end
    end
    check(hit_max > 0, "upper limit never reached");
    check(hit_min > 0, "lower limit never reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
