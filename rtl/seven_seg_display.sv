// seven_seg_display: speed and direction display.
// The measured speed (binary) is converted to DIGITS decimal digits and
// each digit to a 7-segment pattern (dcm_pkg::seg7_encode, segments
// g..a, lit = 1); the direction of the monitored channel lights dir_led
// when it runs forward.  The digits are driven statically, one output
// group per digit, digit 0 the least significant.  Showing the speed on
// 7-segment digits and showing the direction follow the reference design;
// digit count, polarity and static drive are this design's choices.
// Timing: seg and dir_led are registered, one clock after value/dir.
module seven_seg_display
  import dcm_pkg::*;
#(
  parameter int unsigned W      = 14,
  parameter int unsigned DIGITS = 4
) (
  input  logic                clk,
  input  logic                rst,
  input  logic [W-1:0]        value,
  input  dir_e                dir,
  output seg7_t [DIGITS-1:0]  seg,
  output logic                dir_led
);
  logic [DIGITS-1:0][3:0] bcd;

  bin2bcd #(.W(W), .DIGITS(DIGITS)) u_bcd (.bin(value), .bcd(bcd));

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int d = 0; d < DIGITS; d++) seg[d] <= seg7_encode(4'd0);
      dir_led <= 1'b0;
    end else begin
      for (int d = 0; d < DIGITS; d++) seg[d] <= seg7_encode(bcd[d]);
      dir_led <= (dir == DIR_FWD);
    end
  end
endmodule
