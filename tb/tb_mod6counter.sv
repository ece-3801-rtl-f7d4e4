// Self-checking testbench for the modulo-6 counter: random En, CE and Reset
// against a reference count, checking the value and the carry every cycle and
// the carry rate with CE held high.
module tb_mod6counter;
  logic Clk = 0, En, Reset, CE, CE_Out;
  logic [3:0] S;
  int checks = 0, failures = 0;
  int model, wraps;

  mod6counter dut (.*);

  always #5 Clk = ~Clk;

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    logic exp_co;
    exp_co = (CE && model == 6 - 1) || Reset;
    checks++;
    if (S !== 4'(model) || CE_Out !== exp_co) begin
      failures++;
      $display("t=%0t S=%0d exp %0d CE_Out=%b exp %b", $time, S, model, CE_Out, exp_co);
    end
  endtask

  initial begin
    En = 0; Reset = 0; CE = 0;
    model = 0;
    @(negedge Clk); check();
    // free running: one carry per 6 enabled cycles, never a value >= 6
    En = 1; CE = 1; wraps = 0;
    for (int i = 0; i < 10 * 6; i++) begin
      check();
      if (CE_Out) wraps++;
      @(negedge Clk);
      model = (model + 1) % 6;
    end
    checks++;
    if (wraps != 10) begin failures++; $display("carry count %0d, expected 10", wraps); end
    // random stimulus
    for (int i = 0; i < 3000; i++) begin
      En = $urandom_range(1);
      CE = $urandom_range(1);
      Reset = ($urandom_range(15) == 0);
      #1 check();
      @(negedge Clk);
      if (En) model = Reset ? 0 : CE ? (model + 1) % 6 : model;
    end
    #1 check();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
