// tb_dir_ctrl: toggles the direction switch at random times and checks
// that IN_A/IN_B follow it three clocks later (switch set: 1/0, cleared:
// 0/1), that both are low in reset and that they are never high together.
module tb_dir_ctrl;
  import dcm_pkg::*;
  logic clk = 0, rst = 1, sw = 1, in_a, in_b;
  dir_e dir;
  logic [3:0] hist;   // switch value of the last clocks, hist[0] newest
  int checks = 0, failures = 0, changes = 0;

  dir_ctrl dut (.clk(clk), .rst(rst), .dir_sw(sw), .in_a(in_a), .in_b(in_b), .dir(dir));

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

  initial begin
    repeat (3) @(posedge clk);
    #1 check(!in_a && !in_b, "outputs low in reset");
    @(negedge clk) rst = 0;
    hist = '1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      if ($urandom_range(0, 7) == 0) begin sw = ~sw; changes++; end
      @(posedge clk);
      hist = {hist[2:0], sw};
      #1;
      if (i >= 3) begin
        check(in_a == hist[2] && in_b == !hist[2],
              $sformatf("cycle %0d: in_a=%0b in_b=%0b switch sampled 2 clocks ago=%0b", i, in_a, in_b, hist[2]));
        check((dir == DIR_FWD) == hist[1], "dir follows switch one clock after sampling");
      end
    end
    check(changes > 10, "switch toggled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
