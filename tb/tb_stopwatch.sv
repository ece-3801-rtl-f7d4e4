// Self-checking testbench for one stopwatch at a scaled board clock (20 kHz,
// so a tenth of a second is 2000 cycles). A reference model of the run state
// and the elapsed tenths is stepped at every 10 Hz tick; after each tick the
// digits read back from the multiplexed display, the decimal points, COUNTING
// and the 10 Hz square wave are compared with it. The run covers start, stop,
// start and stop pressed together (both when stopped and when running),
// reset, every digit carry and the wrap from 9:59.9 to 0:00.0.
module tb_stopwatch;
  import tb_seg_pkg::*;
  localparam int unsigned CLK_HZ = 20_000;
  localparam int unsigned TENTH  = CLK_HZ / 10;

  logic clk = 0, Reset = 0, Start = 0, Stop = 0;
  logic AN0, AN1, AN2, AN3, a, b, c, d, e, f, g, point_out, clk_10Hz, COUNTING;
  int checks = 0, failures = 0;

  // reference model
  bit run = 0;
  int t = 0;                 // elapsed tenths, 0..5999
  int n_start, n_stop, n_both_idle, n_both_run, n_reset, n_c_sec, n_c_ten, n_c_min, n_wrap;

  // display read-back
  int disp [4];
  logic pt [4];
  int hi_cycles, hi_last;

  stopwatch #(.CLK_HZ(CLK_HZ)) dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    logic [3:0] an;
    an = {AN3, AN2, AN1, AN0};
    for (int i = 0; i < 4; i++)
      if (an == ~(4'b1 << i)) begin
        disp[i] = glyph_value({g, f, e, d, c, b, a});
        pt[i] = ~point_out;
      end
    if (dut.u_clk.tick_10hz) begin
      hi_last = hi_cycles + int'(clk_10Hz);
      hi_cycles = 0;
    end else hi_cycles += int'(clk_10Hz);
  end

  initial begin
    #(10 * 2 * TENTH * 7200);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Apply buttons for one tick, step the model, then compare.
  task automatic tick(bit r, bit s, bit p);
    int old_t;
    Reset = r; Start = s; Stop = p;
    @(posedge clk iff dut.u_clk.tick_10hz);
    old_t = t;
    if (r) n_reset++;
    if (!run && s && p && !r) n_both_idle++;
    if (run && s && p && !r) n_both_run++;
    if (!run && s && !r) n_start++;
    if (run && p && !r) n_stop++;
    if (r) t = 0;
    else if (run) t = (t + 1) % 6000;
    run = r ? 1'b0 : run ? !p : s;
    if (!r && t != old_t) begin
      if (t % 10 == 0) n_c_sec++;
      if (t % 100 == 0) n_c_ten++;
      if (t % 600 == 0) n_c_min++;
      if (t == 0) n_wrap++;
    end
    repeat (40) @(negedge clk);
    checks++;
    if (disp[0] != t % 10 || disp[1] != (t / 10) % 10 ||
        disp[2] != (t / 100) % 6 || disp[3] != (t / 600) % 10) begin
      failures++;
      $display("t=%0d display %0d%0d%0d%0d", t, disp[3], disp[2], disp[1], disp[0]);
    end
    checks++;
    if (pt[0] || !pt[1] || pt[2] || !pt[3]) begin
      failures++;
      $display("decimal points wrong");
    end
    checks++;
    if (COUNTING !== run) begin
      failures++;
      $display("COUNTING=%b expected %b", COUNTING, run);
    end
    checks++;
    if (hi_last != int'(TENTH / 2)) begin
      failures++;
      $display("clk_10Hz high for %0d cycles in a tenth", hi_last);
    end
  endtask

  task automatic expect_counter(string what, int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("%s never happened", what);
    end
  endtask

  initial begin
    n_start = 0; n_stop = 0; n_both_idle = 0; n_both_run = 0; n_reset = 0;
    n_c_sec = 0; n_c_ten = 0; n_c_min = 0; n_wrap = 0;
    hi_cycles = 0; hi_last = TENTH / 2;
    for (int i = 0; i < 4; i++) begin disp[i] = -1; pt[i] = 0; end
    tick(1, 0, 0);
    tick(0, 0, 0);
    tick(0, 1, 0);                          // start
    repeat (25) tick(0, 0, 0);
    tick(0, 0, 1);                          // stop at 2.6
    repeat (5) tick(0, 0, 0);
    tick(0, 1, 1);                          // both while stopped: starts
    repeat (2) tick(0, 0, 0);
    tick(0, 1, 1);                          // both while running: stops
    tick(0, 0, 0);
    tick(0, 1, 0);
    while (t % 10 != 9) tick(0, 0, 0);
    tick(0, 0, 1);                          // stop with tenths at 9
    repeat (3) tick(0, 0, 0);
    tick(0, 1, 0);
    repeat (600) tick(0, 0, 0);             // past a minute
    tick(1, 0, 0);                          // reset while running
    tick(0, 0, 0);
    // random presses
    for (int i = 0; i < 300; i++)
      tick(($urandom_range(99) == 0), ($urandom_range(9) == 0), ($urandom_range(19) == 0));
    if (!run) tick(0, 1, 0);
    while (n_wrap == 0) tick(0, 0, 0);      // run to 9:59.9 and wrap
    repeat (3) tick(0, 0, 0);
    expect_counter("start", n_start);
    expect_counter("stop", n_stop);
    expect_counter("start+stop while stopped", n_both_idle);
    expect_counter("start+stop while running", n_both_run);
    expect_counter("reset", n_reset);
    expect_counter("tenths carry", n_c_sec);
    expect_counter("seconds carry", n_c_ten);
    expect_counter("minute carry", n_c_min);
    expect_counter("wrap", n_wrap);
    $display("starts=%0d stops=%0d both_idle=%0d both_run=%0d resets=%0d carries=%0d/%0d/%0d wraps=%0d",
             n_start, n_stop, n_both_idle, n_both_run, n_reset, n_c_sec, n_c_ten, n_c_min, n_wrap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
