// Stopwatch run/stop controller.
//
// One state bit, Count, says whether the stopwatch is running. Its next value
// is the sum of two product terms:
//   hold  : Count and not Stop and not Reset   (keep running)
//   start : not Count and Start and not Reset  (begin running)
// so Start begins a stopped watch even while Stop is held, Stop halts a running
// one, and Reset forces the stopped state. With both buttons held on a running
// watch neither term is true and it stops. These equations are the design's
// own; sampling them only on En (a one-cycle strobe at the 10 Hz tick) in place
// of clocking the flip-flop from a divided 10 Hz clock is a choice of this RTL,
// which keeps the whole design on the board clock.
//
// Timing: Count changes one Clk cycle after a cycle in which En is high.
// Count powers up low (FPGA configuration value).
module controller (
  input  logic Clk,
  input  logic En,      // 10 Hz tick strobe, one Clk cycle wide
  input  logic Reset,
  input  logic Start,
  input  logic Stop,
  output logic Count
);

  logic d;
  logic count_q = 1'b0;

  always_comb
    d = (count_q & ~Stop & ~Reset) | (~count_q & Start & ~Reset);

  always_ff @(posedge Clk)
    if (En) count_q <= d;

  assign Count = count_q;

endmodule
