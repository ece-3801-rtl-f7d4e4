// Self-checking testbench for the run/stop controller: random Start, Stop,
// Reset and En against a reference of the two product-term equation.
module tb_controller;
  logic Clk = 0, En, Reset, Start, Stop, Count;
  int checks = 0, failures = 0;
  logic model;
  int n_start = 0, n_stop = 0, n_both = 0, n_reset = 0;

  controller dut (.*);

  always #5 Clk = ~Clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    model = 1'b0;
    En = 0; Reset = 0; Start = 0; Stop = 0;
    @(negedge Clk);
    if (Count !== 1'b0) begin failures++; $display("power-up Count not 0"); end
    checks++;
    // start dominates stop when stopped
    {En, Reset, Start, Stop} = 4'b1011;
    @(negedge Clk); checks++;
    if (Count !== 1'b1) begin failures++; $display("start+stop from idle did not start"); end
    // both on a running watch stops it
    @(negedge Clk); checks++;
    if (Count !== 1'b0) begin failures++; $display("start+stop while running did not stop"); end
    model = 1'b0;
    for (int i = 0; i < 2000; i++) begin
      En = ($urandom_range(3) != 0);
      Reset = ($urandom_range(7) == 0);
      Start = $urandom_range(1);
      Stop = $urandom_range(1);
      if (En) begin
        if (!model && Start && !Reset) n_start++;
        if (model && Stop && !Reset) n_stop++;
        if (Start && Stop) n_both++;
        if (Reset) n_reset++;
        model = Reset ? 1'b0 : model ? ~Stop : Start;
      end
      @(negedge Clk);
      checks++;
      if (Count !== model) begin
        failures++;
        $display("mismatch at %0d: Count=%b expected %b", i, Count, model);
      end
    end
    if (n_start == 0 || n_stop == 0 || n_both == 0 || n_reset == 0) failures++;
    $display("starts=%0d stops=%0d both=%0d resets=%0d", n_start, n_stop, n_both, n_reset);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
