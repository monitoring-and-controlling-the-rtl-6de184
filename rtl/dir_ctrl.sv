// dir_ctrl: direction inputs of one H-bridge channel.
// A set switch drives IN_A high and IN_B low (dir_e DIR_FWD), a cleared
// switch the reverse, as in the reference design; the motor then turns one
// way or the other while the enable input carries the PWM.  The switch is
// synchronised and the outputs registered (this design's choice), so the
// outputs follow the switch three clock edges later.  Both outputs are low
// during reset, which lets the motor coast.
module dir_ctrl
  import dcm_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  logic dir_sw,
  output logic in_a,
  output logic in_b,
  output dir_e dir
);
  logic sw_s;

  sync2 u_sync (.clk(clk), .rst(rst), .d(dir_sw), .q(sw_s));

  assign dir = sw_s ? DIR_FWD : DIR_REV;

  always_ff @(posedge clk) begin
    if (rst) begin
      in_a <= 1'b0;
      in_b <= 1'b0;
    end else begin
      in_a <= (dir == DIR_FWD);
      in_b <= (dir == DIR_REV);
    end
  end

  // The bridge must never see both direction inputs high (outputs are
  // undefined before the first reset edge).
  assert property (@(posedge clk) disable iff (rst) !(in_a && in_b));
endmodule
