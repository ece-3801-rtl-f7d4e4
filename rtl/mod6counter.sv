// Modulo-6 counter with clock enable, synchronous reset and carry, used for
// the tens-of-seconds digit.
//
// Works like the decade counter but wraps from 5 to 0, giving the six states
// 0 to 5. CE_Out is high while the counter holds 5 and CE is high, and
// whenever Reset is high. The source design decodes the value six (110) to
// restart the count; here the wrap is taken one state earlier so that the
// digit never shows 6 and the seconds roll over at 60, which is the behaviour
// the design asks for. The output is 4 bits wide like the decade counter so the
// two plug into the same display bus; bit 3 is always 0.
//
// Timing: S changes one Clk cycle after an En cycle; CE_Out is combinational.
module mod6counter
  import stopwatch_pkg::*;
(
  input  logic Clk,
  input  logic En,      // count strobe (10 Hz tick), one Clk cycle wide
  input  logic Reset,
  input  logic CE,
  output bcd_t S,
  output logic CE_Out
);

  logic [2:0] s_q = '0;
  logic       at_max;

  assign at_max = (s_q == 3'd5);

  always_ff @(posedge Clk)
    if (En) begin
      if (Reset)      s_q <= '0;
      else if (CE)    s_q <= at_max ? '0 : s_q + 3'd1;
    end

  assign S      = {1'b0, s_q};
  assign CE_Out = (CE & at_max) | Reset;

endmodule
