// Self-checking testbench for the 4-bit four-way bus multiplexer.
module tb_inputmux;
  logic [3:0] W, X, Y, Z, Q, exp_q;
  logic A0, A1, E;
  int checks = 0, failures = 0;

  inputmux dut (.*);

  initial begin
    for (int i = 0; i < 2000; i++) begin
      {W, X, Y, Z} = 16'($urandom);
      {A1, A0} = 2'($urandom);
      E = ($urandom_range(3) != 0);
      #1;
      exp_q = !E ? 4'h0 : ({A1, A0} == 0) ? W : ({A1, A0} == 1) ? X : ({A1, A0} == 2) ? Y : Z;
      checks++;
      if (Q !== exp_q) begin
        failures++;
        $display("sel=%0d E=%b Q=%h exp %h", {A1, A0}, E, Q, exp_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
