// tb_tick_gen: checks that the divider ticks exactly once every DIV clocks,
// for the default DIV = 5000 and for a small DIV = 3, and that the first
// tick comes DIV cycles after reset.
module tb_tick_gen;
  logic clk = 0, rst = 1;
  logic tick_d, tick_s;
  int checks = 0, failures = 0;

  tick_gen             u_def (.clk(clk), .rst(rst), .tick(tick_d));
  tick_gen #(.DIV(3))  u_sml (.clk(clk), .rst(rst), .tick(tick_s));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint cyc = 0, last_d = -1, last_s = -1;
  int n_d = 0, n_s = 0;
  always @(posedge clk) if (!rst) begin
    cyc++;
    if (tick_d) begin
      if (last_d < 0) check(cyc == 5001, $sformatf("first default tick at %0d", cyc));
      else            check(cyc - last_d == 5000, $sformatf("default tick spacing %0d", cyc - last_d));
      last_d = cyc; n_d++;
    end
    if (tick_s) begin
      if (last_s < 0) check(cyc == 4, $sformatf("first small tick at %0d", cyc));
      else            check(cyc - last_s == 3, $sformatf("small tick spacing %0d", cyc - last_s));
      last_s = cyc; n_s++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (5000 * 20 + 2) @(posedge clk);
    check(n_d == 20, $sformatf("default tick count %0d", n_d));
    check(n_s == (5000 * 20 + 1) / 3, $sformatf("small tick count %0d", n_s));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
