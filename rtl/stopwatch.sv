// One stopwatch: minutes, seconds and tenths (M:SS.T) on four digits.
//
// The controller holds the run/stop state. Four counters form the time:
// tenths (modulo 10, rightmost digit), seconds (modulo 10), tens of seconds
// (modulo 6) and minutes (modulo 10, leftmost digit), so the watch counts
// 0:00.0 to 9:59.9 and then wraps. The enable of each counter is the carry of
// the one to its right (the controller's Count for the tenths) ORed with
// Reset, as in the source schematic. The clock converter makes the 10 Hz
// count tick and the 10 kHz display scan tick; the display driver shows the
// four digits with the points after the minutes and after the seconds lit.
//
// Controller and counters act only on the 10 Hz tick, so Start, Stop and
// Reset must be held across a tick (up to 0.1 s) to be seen. clk_10Hz is the
// 10 Hz square wave and COUNTING the controller's state, brought out for the
// activity LED. AN0..AN3, a..g and point_out are active low.
//
// The block structure and the digit order follow the source design; the use of
// clock-enable strobes in place of divided clocks is this RTL's choice.
module stopwatch #(
  parameter int unsigned CLK_HZ = 50_000_000
) (
  input  logic clk,
  input  logic Reset,
  input  logic Start,
  input  logic Stop,
  output logic AN0,
  output logic AN1,
  output logic AN2,
  output logic AN3,
  output logic a,
  output logic b,
  output logic c,
  output logic d,
  output logic e,
  output logic f,
  output logic g,
  output logic point_out,
  output logic clk_10Hz,
  output logic COUNTING
);
  import stopwatch_pkg::*;

  logic tick_10hz, tick_10khz;
  logic clk_1hz_unused, clk_10khz_sq;
  logic count;
  bcd_t tenths, secs, tens, mins;
  logic co_tenths, co_secs, co_tens, co_mins;

  clk_convrt #(.CLK_HZ(CLK_HZ)) u_clk (
    .Clk_in     (clk),
    .Reset      (1'b0),
    .Clk_1Hz    (clk_1hz_unused),
    .Clk_10Hz   (clk_10Hz),
    .Clk_10KHz  (clk_10khz_sq),
    .tick_10khz (tick_10khz),
    .tick_10hz  (tick_10hz)
  );

  controller u_ctrl (
    .Clk   (clk),
    .En    (tick_10hz),
    .Reset (Reset),
    .Start (Start),
    .Stop  (Stop),
    .Count (count)
  );

  mod10counter u_tenths (
    .Clk(clk), .En(tick_10hz), .Reset(Reset),
    .CE(count | Reset), .S(tenths), .CE_Out(co_tenths)
  );

  mod10counter u_secs (
    .Clk(clk), .En(tick_10hz), .Reset(Reset),
    .CE(co_tenths | Reset), .S(secs), .CE_Out(co_secs)
  );

  mod6counter u_tens (
    .Clk(clk), .En(tick_10hz), .Reset(Reset),
    .CE(co_secs | Reset), .S(tens), .CE_Out(co_tens)
  );

  mod10counter u_mins (
    .Clk(clk), .En(tick_10hz), .Reset(Reset),
    .CE(co_tens | Reset), .S(mins), .CE_Out(co_mins)
  );

  fourdigitdisp u_disp (
    .Clk(clk), .En(tick_10khz), .Reset(1'b0),
    .W(tenths), .X(secs), .Y(tens), .Z(mins),
    .p0(1'b0), .p1(1'b1), .p2(1'b0), .p3(1'b1),
    .AN0(AN0), .AN1(AN1), .AN2(AN2), .AN3(AN3),
    .a(a), .b(b), .c(c), .d(d), .e(e), .f(f), .g(g),
    .point_out(point_out)
  );

  assign COUNTING = count;

endmodule
