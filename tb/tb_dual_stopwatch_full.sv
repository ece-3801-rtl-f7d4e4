// Full-size test of the dual stopwatch at its default 50 MHz board clock:
// reset both stopwatches, time 1.2 s on A, 0.3 s on B while A is stopped,
// and read both results back from the multiplexed display through the A/B
// switch. Each tenth of a second is 5,000,000 clock cycles here.
module tb_dual_stopwatch_full;
  import tb_seg_pkg::*;
  logic CLK = 0, Reset = 0, Start = 0, Stop = 0, SELECT_T = 0;
  logic AN0, AN1, AN2, AN3, point_out, COUNT_1, COUNT_2, STATE_1, STATE_2;
  logic [3:0] a_f_o;
  logic [2:0] e_f_o;
  int checks = 0, failures = 0;
  int disp [4];
  int ticks = 0;
  int blink_a = 0;

  dual_stopwatch dut (.*);

  always #5 CLK = ~CLK;

  always @(posedge CLK) begin
    logic [3:0] an;
    an = {AN3, AN2, AN1, AN0};
    for (int i = 0; i < 4; i++)
      if (an == ~(4'b1 << i)) disp[i] = glyph_value({e_f_o, a_f_o});
    if (dut.u_sw_a.u_clk.tick_10hz) ticks++;
    blink_a += int'(STATE_1);
  end

  initial begin
    #(10 * 64'd5_000_000 * 30);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic press(bit sel, bit r, bit s, bit p);
    SELECT_T = sel; Reset = r; Start = s; Stop = p;
    @(posedge CLK iff dut.u_sw_a.u_clk.tick_10hz);
    @(negedge CLK);
    Reset = 0; Start = 0; Stop = 0;
  endtask

  task automatic wait_ticks(int n);
    repeat (n) @(posedge CLK iff dut.u_sw_a.u_clk.tick_10hz);
    @(negedge CLK);
  endtask

  task automatic show(bit sel, int m, int s10, int s1, int t1);
    SELECT_T = sel;
    repeat (30_000) @(negedge CLK);         // six full display scans
    checks++;
    if (disp[3] != m || disp[2] != s10 || disp[1] != s1 || disp[0] != t1) begin
      failures++;
      $display("stopwatch %s shows %0d:%0d%0d.%0d, expected %0d:%0d%0d.%0d", sel ? "B" : "A",
               disp[3], disp[2], disp[1], disp[0], m, s10, s1, t1);
    end
  endtask

  initial begin
    for (int i = 0; i < 4; i++) disp[i] = -1;
    press(0, 1, 0, 0);
    press(1, 1, 0, 0);
    show(1, 0, 0, 0, 0);
    press(0, 0, 1, 0);                      // start A
    wait_ticks(11);
    press(0, 0, 0, 1);                      // stop A: 12 counted tenths
    show(0, 0, 0, 1, 2);
    checks++;
    if (blink_a == 0) begin failures++; $display("A's LED never lit"); end
    press(1, 0, 1, 0);                      // start B
    wait_ticks(2);
    press(1, 0, 0, 1);                      // stop B: 3 tenths
    show(1, 0, 0, 0, 3);
    show(0, 0, 0, 1, 2);
    checks++;
    if (COUNT_1 !== 1'b1 || COUNT_2 !== 1'b0) begin failures++; $display("select LEDs"); end
    $display("tenths elapsed: %0d", ticks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
