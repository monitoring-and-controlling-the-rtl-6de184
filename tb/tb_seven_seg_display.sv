// tb_seven_seg_display: random and corner values through the display;
// each digit must show the decimal digit of the value (values above 9999
// show 9999) with the segment patterns of a standard gfedcba table, one
// clock later; dir_led must follow the direction.
module tb_seven_seg_display;
  import dcm_pkg::*;
  logic clk = 0, rst = 1;
  logic [13:0] value;
  dir_e dir;
  seg7_t [3:0] seg;
  logic dir_led;
  int checks = 0, failures = 0;
  // a = bit 0 ... g = bit 6
  logic [6:0] table_s [10] = '{7'h3F, 7'h06, 7'h5B, 7'h4F, 7'h66, 7'h6D, 7'h7D, 7'h07, 7'h7F, 7'h6F};

  seven_seg_display dut (.clk(clk), .rst(rst), .value(value), .dir(dir), .seg(seg), .dir_led(dir_led));

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

  task automatic show(input int v, input bit d);
    int shown, x;
    @(negedge clk);
    value = 14'(v); dir = d ? DIR_FWD : DIR_REV;
    @(negedge clk);
    shown = (v > 9999) ? 9999 : v;
    x = shown;
    for (int k = 0; k < 4; k++) begin
      check(seg[k] == table_s[x % 10], $sformatf("value %0d digit %0d: %b", v, k, seg[k]));
      x = x / 10;
    end
    check(dir_led == d, "direction LED");
  endtask

  initial begin
    value = 0; dir = DIR_REV;
    repeat (2) @(posedge clk);
    #1 check(seg[0] == table_s[0] && seg[3] == table_s[0] && !dir_led, "reset shows 0000");
    rst = 0;
    show(0, 0); show(1, 1); show(9, 0); show(10, 1); show(99, 0); show(100, 1);
    show(1095, 1); show(9999, 0); show(10000, 1); show(16383, 0);
    for (int i = 0; i < 2000; i++) show($urandom_range(0, 16383), 1'($urandom_range(0, 1)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
