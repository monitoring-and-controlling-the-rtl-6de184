// bin2bcd: combinational binary to BCD conversion (shift-and-add-3).
// Converts a W-bit unsigned value into DIGITS decimal digits, least
// significant digit in bcd[0].  A value above 10^DIGITS - 1 is shown as
// all nines.
module bin2bcd #(
  parameter int unsigned W      = 14,
  parameter int unsigned DIGITS = 4
) (
  input  logic [W-1:0]          bin,
  output logic [DIGITS-1:0][3:0] bcd
);
  localparam longint unsigned LIMIT = (DIGITS >= 19) ? 64'hFFFF_FFFF_FFFF_FFFF
                                      : (10 ** DIGITS) - 1;
  logic [DIGITS*4-1:0] sh;

  always_comb begin
    sh = '0;
    for (int i = W - 1; i >= 0; i--) begin
      for (int d = 0; d < DIGITS; d++)
        if (sh[d*4 +: 4] >= 4'd5) sh[d*4 +: 4] = sh[d*4 +: 4] + 4'd3;
      sh = {sh[DIGITS*4-2:0], bin[i]};
    end
    if (64'(bin) > LIMIT)
      for (int d = 0; d < DIGITS; d++) sh[d*4 +: 4] = 4'd9;
    for (int d = 0; d < DIGITS; d++) bcd[d] = sh[d*4 +: 4];
  end
endmodule
