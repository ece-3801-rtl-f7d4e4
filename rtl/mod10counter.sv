// Modulo-10 (decade) counter with clock enable, synchronous reset and carry.
//
// On a cycle with En high the counter clears if Reset is high, otherwise
// advances when CE is high, wrapping from 9 to 0. CE_Out is the carry to the
// next digit: it is high while the counter holds 9 and CE is high, and also
// whenever Reset is high, so that a chain of counters passes the reset along
// the enables as in the original schematic. Gating the carry with CE (so a
// stopped watch resting on 9 does not advance the next digit) and clearing at
// 9 only when counting are this design's choices that make the chain keep
// time; the wrap point and the Reset term in CE_Out follow the source design.
//
// Timing: S changes one Clk cycle after an En cycle; CE_Out is combinational.
module mod10counter
  import stopwatch_pkg::*;
(
  input  logic Clk,
  input  logic En,      // count strobe (10 Hz tick), one Clk cycle wide
  input  logic Reset,
  input  logic CE,
  output bcd_t S,
  output logic CE_Out
);

  bcd_t s_q = '0;
  logic at_max;

  assign at_max = (s_q == 4'd9);

  always_ff @(posedge Clk)
    if (En) begin
      if (Reset)      s_q <= '0;
      else if (CE)    s_q <= at_max ? '0 : s_q + 4'd1;
    end

  assign S      = s_q;
  assign CE_Out = (CE & at_max) | Reset;

endmodule
