// dcm_pkg: types and constants shared by the DC-motor controller.
// The controller drives one dual H-bridge of the L298 kind: per channel an
// enable input that carries the PWM and two direction inputs.  The clock
// rate, the divider value and the 9-bit duty register follow the reference
// board design; the 100-step PWM period and the display encoding are this
// design's choices.
package dcm_pkg;

  localparam int unsigned CLK_HZ_DEF    = 50_000_000; // board oscillator
  localparam int unsigned DIV_DEF       = 5000;       // clock divider value
  localparam int unsigned PWM_STEPS_DEF = 100;        // duty in percent
  localparam int unsigned DUTY_W        = 9;          // duty register width
  localparam int unsigned RPM_W         = 14;         // up to 16383 rpm

  // Rotation sense of one bridge channel.  FWD drives IN_A high, IN_B low.
  typedef enum logic {
    DIR_REV = 1'b0,
    DIR_FWD = 1'b1
  } dir_e;

  // Segment pattern of one 7-segment digit, bit 6..0 = g f e d c b a,
  // a lit segment is 1.
  typedef logic [6:0] seg7_t;

  function automatic seg7_t seg7_encode(input logic [3:0] d);
    case (d)
      4'd0:    return 7'b011_1111;
      4'd1:    return 7'b000_0110;
      4'd2:    return 7'b101_1011;
      4'd3:    return 7'b100_1111;
      4'd4:    return 7'b110_0110;
      4'd5:    return 7'b110_1101;
      4'd6:    return 7'b111_1101;
      4'd7:    return 7'b000_0111;
      4'd8:    return 7'b111_1111;
      4'd9:    return 7'b110_1111;
      default: return 7'b100_0000; // minus sign for non-decimal codes
    endcase
  endfunction

endpackage
