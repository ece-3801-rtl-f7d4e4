// Dual stopwatch: two independent M:SS.T stopwatches, A and B, on one
// four-digit display, with one set of buttons and an A/B switch.
//
// SELECT_T (switch SW7) picks the stopwatch the buttons act on and the display
// shows: 0 selects A, 1 selects B. Start, Stop and Reset are ANDed with the
// selection before they reach a stopwatch, so the unselected one keeps running
// or stays stopped untouched. Each stopwatch drives its own display scanner;
// two bus multiplexers pass the selected one's segments (a..d on a_f_o, e..g on
// e_f_o) to the board. The two scanners run in step from the same clock and
// power-up state, and the anode lines of both are ORed (active low), as in the
// source schematic. point_out comes from stopwatch B, whose decimal points are
// the same as A's.
//
// LEDs: COUNT_1 and COUNT_2 (LD7, LD6) show which stopwatch is selected;
// STATE_1 and STATE_2 (LD1, LD0) blink at 10 Hz while A or B is running.
//
// All display outputs are active low. Button presses act on the next 10 Hz
// tick. Port names are the pin names of the board constraints. The structure
// follows the source design; the 50 MHz default clock is an assumption.
module dual_stopwatch #(
  parameter int unsigned CLK_HZ = 50_000_000
) (
  input  logic       CLK,
  input  logic       Reset,
  input  logic       Start,
  input  logic       Stop,
  input  logic       SELECT_T,
  output logic       AN0,
  output logic       AN1,
  output logic       AN2,
  output logic       AN3,
  output logic [3:0] a_f_o,       // segments {d,c,b,a}
  output logic [2:0] e_f_o,       // segments {g,f,e}
  output logic       point_out,
  output logic       COUNT_1,     // LD7: A selected
  output logic       COUNT_2,     // LD6: B selected
  output logic       STATE_1,     // LD1: A running (blinks)
  output logic       STATE_2      // LD0: B running (blinks)
);

  logic not_select;
  logic an0_1, an1_1, an2_1, an3_1, an0_2, an1_2, an2_2, an3_2;
  logic [3:0] a_d_1, a_d_2;
  logic [2:0] e_g_1, e_g_2;
  logic point_1, point_2;
  logic clk10_1, clk10_2, counting_1, counting_2;
  logic [3:0] e_mux;

  assign not_select = ~SELECT_T;

  stopwatch #(.CLK_HZ(CLK_HZ)) u_sw_a (
    .clk(CLK),
    .Reset(Reset & not_select), .Start(Start & not_select), .Stop(Stop & not_select),
    .AN0(an0_1), .AN1(an1_1), .AN2(an2_1), .AN3(an3_1),
    .a(a_d_1[0]), .b(a_d_1[1]), .c(a_d_1[2]), .d(a_d_1[3]),
    .e(e_g_1[0]), .f(e_g_1[1]), .g(e_g_1[2]),
    .point_out(point_1), .clk_10Hz(clk10_1), .COUNTING(counting_1)
  );

  stopwatch #(.CLK_HZ(CLK_HZ)) u_sw_b (
    .clk(CLK),
    .Reset(Reset & SELECT_T), .Start(Start & SELECT_T), .Stop(Stop & SELECT_T),
    .AN0(an0_2), .AN1(an1_2), .AN2(an2_2), .AN3(an3_2),
    .a(a_d_2[0]), .b(a_d_2[1]), .c(a_d_2[2]), .d(a_d_2[3]),
    .e(e_g_2[0]), .f(e_g_2[1]), .g(e_g_2[2]),
    .point_out(point_2), .clk_10Hz(clk10_2), .COUNTING(counting_2)
  );

  inputmux u_mux_ad (
    .W(a_d_1), .X(a_d_2), .Y('0), .Z('0),
    .A0(SELECT_T), .A1(1'b0), .E(1'b1), .Q(a_f_o)
  );

  inputmux u_mux_eg (
    .W({1'b0, e_g_1}), .X({1'b0, e_g_2}), .Y('0), .Z('0),
    .A0(SELECT_T), .A1(1'b0), .E(1'b1), .Q(e_mux)
  );

  assign e_f_o = e_mux[2:0];

  assign AN0 = an0_1 | an0_2;
  assign AN1 = an1_1 | an1_2;
  assign AN2 = an2_1 | an2_2;
  assign AN3 = an3_1 | an3_2;

  assign point_out = point_2;

  assign STATE_1 = clk10_1 & counting_1;
  assign STATE_2 = clk10_2 & counting_2;
  assign COUNT_1 = not_select;
  assign COUNT_2 = SELECT_T;

endmodule
