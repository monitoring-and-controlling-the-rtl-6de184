// speed_meter: speed measurement from an opto-interrupter.
// A slotted disc on the motor shaft interrupts a light barrier PPR times per
// revolution.  The sensor signal is synchronised, its rising edges are
// counted during a gate of GATE_CYCLES clocks, and at the end of each gate
// the count is scaled to revolutions per minute:
//     rpm = count * 60 * CLK_HZ / (GATE_CYCLES * PPR)
// With the defaults (1 s gate, one pulse per revolution) one pulse is
// 60 rpm.  Counting pulses over a fixed period and one pulse per turn
// follow the reference design; the gate length is this design's choice.
// Timing: rpm and valid are registered; valid is a one-cycle strobe in the
// clock after each gate ends, the first one GATE_CYCLES+1 cycles after
// reset.  The count and the result saturate at the top of their range.
module speed_meter #(
  parameter int unsigned CLK_HZ      = 50_000_000,
  parameter int unsigned GATE_CYCLES = 50_000_000,
  parameter int unsigned PPR         = 1,
  parameter int unsigned RPM_W       = 14
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             opto_in,
  output logic [RPM_W-1:0] rpm,
  output logic             valid
);
  localparam longint unsigned RPM_PER_COUNT =
      (64'd60 * CLK_HZ) / (64'(GATE_CYCLES) * PPR);
  localparam int unsigned GW   = (GATE_CYCLES > 1) ? $clog2(GATE_CYCLES) : 1;
  localparam int unsigned CW   = RPM_W;
  localparam longint unsigned RPM_MAX = (64'd1 << RPM_W) - 1;

  logic          opto_s, opto_d;
  logic [GW-1:0] gate_cnt;
  logic [CW-1:0] pulse_cnt;
  logic          edge_seen, gate_end;
  logic [CW+31:0] scaled;

  sync2 u_sync (.clk(clk), .rst(rst), .d(opto_in), .q(opto_s));

  assign edge_seen = opto_s && !opto_d;
  assign gate_end  = (gate_cnt == GW'(GATE_CYCLES - 1));
  assign scaled    = (CW+32)'(pulse_cnt) * (CW+32)'(RPM_PER_COUNT);

  always_ff @(posedge clk) begin
    if (rst) begin
      opto_d    <= 1'b0;
      gate_cnt  <= '0;
      pulse_cnt <= '0;
      rpm       <= '0;
      valid     <= 1'b0;
    end else begin
      opto_d <= opto_s;
      valid  <= 1'b0;
      if (gate_end) begin
        gate_cnt  <= '0;
        // a pulse in the last gate cycle opens the next count
        pulse_cnt <= edge_seen ? CW'(1) : '0;
        rpm       <= (scaled > (CW+32)'(RPM_MAX)) ? RPM_W'(RPM_MAX) : RPM_W'(scaled);
        valid     <= 1'b1;
      end else begin
        gate_cnt <= gate_cnt + 1'b1;
        if (edge_seen && pulse_cnt != '1) pulse_cnt <= pulse_cnt + 1'b1;
      end
    end
  end

  initial assert (RPM_PER_COUNT >= 1 && GATE_CYCLES >= 2)
    else $error("speed_meter: gate too long for the RPM resolution");
endmodule
