// Self-checking testbench for the clock converter at a scaled board clock
// (40 kHz, giving a 4-cycle scan tick): checks the period of both strobes,
// the period and duty of the three square waves, and synchronous reset.
module tb_clk_convrt;
  localparam int unsigned CLK_HZ = 40_000;
  localparam int unsigned D0 = CLK_HZ / 10_000;    // cycles per 10 kHz period
  localparam int unsigned D1 = D0 * 1000;          // cycles per 10 Hz period
  localparam int unsigned D2 = D1 * 10;            // cycles per 1 Hz period
  logic Clk_in = 0, Reset;
  logic Clk_1Hz, Clk_10Hz, Clk_10KHz, tick_10khz, tick_10hz;
  int checks = 0, failures = 0;
  int cyc;
  int n_fast, n_slow, hi_10k, hi_10, hi_1;

  clk_convrt #(.CLK_HZ(CLK_HZ)) dut (.*);

  always #5 Clk_in = ~Clk_in;

  initial begin
    #(10 * (3 * D2 + 100));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(string what, int got, int want);
    checks++;
    if (got != want) begin
      failures++;
      $display("%s: got %0d expected %0d", what, got, want);
    end
  endtask

  initial begin
    Reset = 1;
    @(negedge Clk_in);
    Reset = 0;
    n_fast = 0; n_slow = 0; hi_10k = 0; hi_10 = 0; hi_1 = 0;
    // After reset cycle index cyc counts from 0; sample two full 1 Hz periods.
    for (cyc = 0; cyc < 2 * D2; cyc++) begin
      expect_eq("tick_10khz", int'(tick_10khz), int'((cyc % D0) == D0 - 1));
      expect_eq("tick_10hz", int'(tick_10hz), int'((cyc % D1) == D1 - 1));
      if (tick_10khz) n_fast++;
      if (tick_10hz) n_slow++;
      hi_10k += int'(Clk_10KHz);
      hi_10 += int'(Clk_10Hz);
      hi_1 += int'(Clk_1Hz);
      if ((cyc % D1) == 0) expect_eq("Clk_10Hz rises", int'(Clk_10Hz), 1);
      if ((cyc % D1) == D1 / 2) expect_eq("Clk_10Hz falls", int'(Clk_10Hz), 0);
      @(negedge Clk_in);
    end
    expect_eq("10 kHz strobes", n_fast, 2 * D2 / D0);
    expect_eq("10 Hz strobes", n_slow, 20);
    expect_eq("Clk_10KHz high cycles", hi_10k, D2);
    expect_eq("Clk_10Hz high cycles", hi_10, D2);
    expect_eq("Clk_1Hz high cycles", hi_1, D2);
    // synchronous reset in the middle of a period
    repeat (1234) @(negedge Clk_in);
    Reset = 1; @(negedge Clk_in); Reset = 0;
    for (cyc = 0; cyc < D1 + 2; cyc++) begin
      expect_eq("tick_10hz after reset", int'(tick_10hz), int'(cyc == D1 - 1));
      @(negedge Clk_in);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
