// End-to-end testbench of the dual stopwatch at a scaled board clock (20 kHz,
// 2000 cycles per tenth of a second). Two reference stopwatches are stepped
// at every 10 Hz tick with the buttons gated by the A/B switch. After each
// tick the four digits read back from the shared display must equal the
// selected reference, the select LEDs must follow the switch and each blink
// LED must have been lit for half of the last tenth exactly when its
// stopwatch ran. Directed steps and random presses make every mechanism
// happen; each is counted and one that never happened is a failure.
module tb_dual_stopwatch;
  import tb_seg_pkg::*;
  localparam int unsigned CLK_HZ = 20_000;
  localparam int unsigned TENTH  = CLK_HZ / 10;

  logic CLK = 0, Reset = 0, Start = 0, Stop = 0, SELECT_T = 0;
  logic AN0, AN1, AN2, AN3, point_out, COUNT_1, COUNT_2, STATE_1, STATE_2;
  logic [3:0] a_f_o;
  logic [2:0] e_f_o;
  int checks = 0, failures = 0;

  bit run [2];
  bit prev_run [2];
  int t [2];
  int disp [4];
  int hi_cycles [2], hi_last [2];

  typedef enum int {M_START, M_STOP, M_BOTH_IDLE, M_BOTH_RUN, M_RESET, M_SELECT,
                    M_IGNORED, M_BACKGROUND, M_C_SEC, M_C_TEN, M_C_MIN, M_WRAP,
                    M_BLINK, M_NUM} mech_e;
  int mech [M_NUM];
  string mech_name [M_NUM] = '{"start", "stop", "start+stop while stopped",
    "start+stop while running", "reset", "select switch", "press ignored by unselected",
    "unselected keeps running", "tenths carry", "seconds carry", "minute carry",
    "wrap", "blink"};

  dual_stopwatch #(.CLK_HZ(CLK_HZ)) dut (.*);

  always #5 CLK = ~CLK;

  always @(posedge CLK) begin
    logic [3:0] an;
    an = {AN3, AN2, AN1, AN0};
    for (int i = 0; i < 4; i++)
      if (an == ~(4'b1 << i)) disp[i] = glyph_value({e_f_o, a_f_o});
    if (dut.u_sw_a.u_clk.tick_10hz) begin
      hi_last[0] = hi_cycles[0] + int'(STATE_1);
      hi_last[1] = hi_cycles[1] + int'(STATE_2);
      hi_cycles[0] = 0;
      hi_cycles[1] = 0;
    end else begin
      hi_cycles[0] += int'(STATE_1);
      hi_cycles[1] += int'(STATE_2);
    end
  end

  initial begin
    #(10 * TENTH * 9000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  task automatic tick(bit sel, bit r, bit s, bit p);
    if (sel != SELECT_T) mech[M_SELECT]++;
    SELECT_T = sel; Reset = r; Start = s; Stop = p;
    @(posedge CLK iff dut.u_sw_a.u_clk.tick_10hz);
    for (int w = 0; w < 2; w++) begin
      bit act;
      int old_t;
      act = (w == int'(sel));
      prev_run[w] = run[w];
      old_t = t[w];
      if (!act && (r || s || p)) mech[M_IGNORED]++;
      if (!act && run[w]) mech[M_BACKGROUND]++;
      if (act) begin
        if (r) mech[M_RESET]++;
        if (!run[w] && s && p && !r) mech[M_BOTH_IDLE]++;
        if (run[w] && s && p && !r) mech[M_BOTH_RUN]++;
        if (!run[w] && s && !r) mech[M_START]++;
        if (run[w] && p && !r) mech[M_STOP]++;
      end
      if (act && r) t[w] = 0;
      else if (run[w]) t[w] = (t[w] + 1) % 6000;
      if (act) run[w] = r ? 1'b0 : run[w] ? !p : s;
      if (t[w] != old_t && !(act && r)) begin
        if (t[w] % 10 == 0) mech[M_C_SEC]++;
        if (t[w] % 100 == 0) mech[M_C_TEN]++;
        if (t[w] % 600 == 0) mech[M_C_MIN]++;
        if (t[w] == 0) mech[M_WRAP]++;
      end
    end
    repeat (40) @(negedge CLK);
    begin
      int v;
      v = t[sel];
      check(disp[0] == v % 10 && disp[1] == (v / 10) % 10 &&
            disp[2] == (v / 100) % 6 && disp[3] == (v / 600) % 10,
            $sformatf("display %0d%0d%0d%0d, stopwatch %s at %0d tenths",
                      disp[3], disp[2], disp[1], disp[0], sel ? "B" : "A", v));
    end
    check(COUNT_1 == !sel && COUNT_2 == sel, "select LEDs");
    for (int w = 0; w < 2; w++) begin
      check(hi_last[w] == (prev_run[w] ? int'(TENTH / 2) : 0),
            $sformatf("blink LED %0d lit %0d cycles, running=%b", w, hi_last[w], prev_run[w]));
      if (hi_last[w] > 0) mech[M_BLINK]++;
    end
    check(point_out == (AN1 & AN3), "decimal point");
  endtask

  initial begin
    for (int i = 0; i < M_NUM; i++) mech[i] = 0;
    for (int w = 0; w < 2; w++) begin
      run[w] = 0; prev_run[w] = 0; t[w] = 0; hi_cycles[w] = 0; hi_last[w] = 0;
    end
    for (int i = 0; i < 4; i++) disp[i] = -1;
    tick(0, 1, 0, 0);                      // reset A
    tick(1, 1, 0, 0);                      // reset B
    tick(0, 0, 1, 0);                      // start A
    repeat (12) tick(0, 0, 0, 0);
    tick(1, 0, 1, 0);                      // start B, A keeps running
    repeat (7) tick(1, 0, 0, 0);
    tick(1, 0, 0, 1);                      // stop B
    tick(0, 0, 0, 0);
    tick(1, 0, 1, 1);                      // both on stopped B: starts
    tick(0, 0, 1, 1);                      // both on running A: stops
    tick(0, 0, 0, 0);
    tick(0, 0, 1, 0);                      // restart A
    repeat (620) tick($urandom_range(1), 0, 0, 0);   // A and B cross a minute
    tick(1, 1, 0, 0);                      // reset B only
    for (int i = 0; i < 300; i++)
      tick(($urandom_range(15) == 0) ? !SELECT_T : SELECT_T,
           ($urandom_range(99) == 0), ($urandom_range(9) == 0), ($urandom_range(19) == 0));
    tick(0, 0, 1, 0);
    while (mech[M_WRAP] == 0) tick(0, 0, 0, 0);     // A reaches 9:59.9 and wraps
    repeat (2) tick(1, 0, 0, 0);
    for (int i = 0; i < M_NUM; i++) begin
      check(mech[i] > 0, {mech_name[i], " never happened"});
      $display("%-28s %0d", mech_name[i], mech[i]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
