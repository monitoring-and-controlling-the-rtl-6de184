// tick_gen: clock divider of the motor controller.
// A counter runs from 0 to DIV-1 on the system clock and issues a one-cycle
// tick when it wraps, so tick rises once every DIV cycles (100 us with the
// 50 MHz board clock and DIV = 5000).  The reference design toggles a
// divided clock register instead; here the divider yields a clock enable so
// the whole controller stays on one clock.  The counter is as wide as DIV
// needs, rather than a fixed 11 bits, so that the value 5000 fits.
// Interface: tick is registered, high for exactly one cycle per period; the
// first tick comes DIV cycles after reset is released.
module tick_gen #(
  parameter int unsigned DIV = 5000
) (
  input  logic clk,
  input  logic rst,
  output logic tick
);
  localparam int unsigned W = (DIV > 1) ? $clog2(DIV) : 1;

  logic [W-1:0] count_div_inc;

  always_ff @(posedge clk) begin
    if (rst) begin
      count_div_inc <= '0;
      tick          <= 1'b0;
    end else if (count_div_inc == W'(DIV - 1)) begin
      count_div_inc <= '0;
      tick          <= 1'b1;
    end else begin
      count_div_inc <= count_div_inc + 1'b1;
      tick          <= 1'b0;
    end
  end

  initial assert (DIV >= 1) else $error("tick_gen: DIV must be at least 1");
endmodule
