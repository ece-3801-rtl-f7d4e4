// Self-checking testbench for the multiplexed display driver: after each scan
// strobe exactly one anode is low, in the order AN0, AN1, AN2, AN3, and the
// segments and point show that digit's value.
module tb_fourdigitdisp;
  import tb_seg_pkg::*;
  logic Clk = 0, En, Reset;
  logic [3:0] W, X, Y, Z;
  logic p0, p1, p2, p3;
  logic AN0, AN1, AN2, AN3, a, b, c, d, e, f, g, point_out;
  int checks = 0, failures = 0;
  int expected_digit;
  logic [3:0] vals [4];
  logic [3:0] pts;

  fourdigitdisp dut (.*);

  always #5 Clk = ~Clk;

  initial begin
    #500000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    checks++;
    if ({AN3, AN2, AN1, AN0} !== ~(4'b1 << expected_digit)) begin
      failures++;
      $display("anodes %b, expected digit %0d", {AN3, AN2, AN1, AN0}, expected_digit);
    end else if ({g, f, e, d, c, b, a} !== ~GLYPH[vals[expected_digit]] ||
                 point_out !== ~pts[expected_digit]) begin
      failures++;
      $display("digit %0d segs %b point %b, value %h", expected_digit,
               {g, f, e, d, c, b, a}, point_out, vals[expected_digit]);
    end
  endtask

  initial begin
    En = 0; Reset = 1;
    {W, X, Y, Z, p0, p1, p2, p3} = '0;
    @(negedge Clk);
    Reset = 0;
    expected_digit = 0;
    for (int i = 0; i < 1000; i++) begin
      W = 4'($urandom); X = 4'($urandom); Y = 4'($urandom); Z = 4'($urandom);
      {p3, p2, p1, p0} = 4'($urandom);
      vals = '{W, X, Y, Z};
      pts = {p3, p2, p1, p0};
      #1 check();
      En = ($urandom_range(1) == 1);
      @(negedge Clk);
      if (En) expected_digit = (expected_digit + 1) % 4;
      En = 0;
      #1 check();
    end
    // Reset returns to digit 0
    Reset = 1; @(negedge Clk); Reset = 0;
    expected_digit = 0;
    #1 check();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
