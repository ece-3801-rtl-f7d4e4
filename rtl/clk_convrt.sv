// Clock converter: derives the stopwatch time bases from the board clock.
//
// A chain of three counters divides the board clock CLK_HZ down to SCAN_HZ
// (10 kHz, the display scan rate), then to TICK_HZ (10 Hz, one tenth of a
// second) and then to SLOW_HZ (1 Hz). For every rate the block gives a square
// wave (Clk_10KHz, Clk_10Hz, Clk_1Hz, high for the first half of each period)
// and a one-cycle strobe (tick_10khz, tick_10hz) that the rest of the design
// uses as a clock enable, so that all flip-flops run on the board clock. The
// three output rates are those the design names; the 50 MHz board clock, the
// counter structure and the strobes are this RTL's own choices.
//
// Reset clears all three counters synchronously. The counters also power up
// at zero, so two instances fed by the same clock stay in step without a reset.
// Each rate must divide the one above it exactly.
module clk_convrt #(
  parameter int unsigned CLK_HZ  = 50_000_000,
  parameter int unsigned SCAN_HZ = 10_000,
  parameter int unsigned TICK_HZ = 10,
  parameter int unsigned SLOW_HZ = 1
) (
  input  logic Clk_in,
  input  logic Reset,
  output logic Clk_1Hz,
  output logic Clk_10Hz,
  output logic Clk_10KHz,
  output logic tick_10khz,
  output logic tick_10hz
);

  localparam int unsigned DIV0 = CLK_HZ  / SCAN_HZ;
  localparam int unsigned DIV1 = SCAN_HZ / TICK_HZ;
  localparam int unsigned DIV2 = TICK_HZ / SLOW_HZ;
  localparam int unsigned W0   = (DIV0 > 1) ? $clog2(DIV0) : 1;
  localparam int unsigned W1   = (DIV1 > 1) ? $clog2(DIV1) : 1;
  localparam int unsigned W2   = (DIV2 > 1) ? $clog2(DIV2) : 1;

  initial begin
    assert (DIV0 >= 2 && DIV0 * SCAN_HZ == CLK_HZ)
      else $error("CLK_HZ must be a multiple (>=2) of SCAN_HZ");
    assert (DIV1 >= 2 && DIV1 * TICK_HZ == SCAN_HZ)
      else $error("SCAN_HZ must be a multiple (>=2) of TICK_HZ");
    assert (DIV2 >= 2 && DIV2 * SLOW_HZ == TICK_HZ)
      else $error("TICK_HZ must be a multiple (>=2) of SLOW_HZ");
  end

  logic [W0-1:0] c0 = '0;
  logic [W1-1:0] c1 = '0;
  logic [W2-1:0] c2 = '0;
  logic          last0, last1, last2;

  assign last0 = (c0 == W0'(DIV0 - 1));
  assign last1 = (c1 == W1'(DIV1 - 1));
  assign last2 = (c2 == W2'(DIV2 - 1));

  always_ff @(posedge Clk_in) begin
    if (Reset) begin
      c0 <= '0;
      c1 <= '0;
      c2 <= '0;
    end else begin
      c0 <= last0 ? '0 : c0 + 1'b1;
      if (last0) begin
        c1 <= last1 ? '0 : c1 + 1'b1;
        if (last1) c2 <= last2 ? '0 : c2 + 1'b1;
      end
    end
  end

  assign tick_10khz = last0;
  assign tick_10hz  = last0 & last1;

  assign Clk_10KHz = (c0 < W0'(DIV0 / 2));
  assign Clk_10Hz  = (c1 < W1'(DIV1 / 2));
  assign Clk_1Hz   = (c2 < W2'(DIV2 / 2));

endmodule
