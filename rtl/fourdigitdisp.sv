// Four-digit multiplexed seven-segment display driver.
//
// The board's four digits share one set of segment lines; each digit has its
// own active-low anode enable. On every En strobe (the 10 kHz scan tick) the
// driver moves to the next digit: digit 0 (anode AN0, rightmost) shows W,
// digit 1 shows X, digit 2 shows Y and digit 3 (AN3, leftmost) shows Z. The
// selected value is decoded to segments a..g and its decimal point comes from
// p0..p3 (1 = point lit). Segments and point_out are active low, like the
// anodes. The input names and their mapping to AN0..AN3 follow the source
// design; the scan order, the decoder and the active-low outputs are this
// RTL's choices for a common-anode board. The source symbol also has four
// inputs s0..s3, left open there and not described, which are not modelled.
//
// Timing: the anodes change one Clk cycle after each En strobe; the segments
// follow the inputs combinationally for the selected digit. Reset (and power
// up) selects digit 0.
module fourdigitdisp
  import stopwatch_pkg::*;
(
  input  logic Clk,
  input  logic En,          // scan strobe, one Clk cycle wide
  input  logic Reset,
  input  bcd_t W,
  input  bcd_t X,
  input  bcd_t Y,
  input  bcd_t Z,
  input  logic p0,
  input  logic p1,
  input  logic p2,
  input  logic p3,
  output logic AN0,
  output logic AN1,
  output logic AN2,
  output logic AN3,
  output logic a,
  output logic b,
  output logic c,
  output logic d,
  output logic e,
  output logic f,
  output logic g,
  output logic point_out
);

  logic [1:0] digit = '0;
  bcd_t       value;
  logic       point;
  seg7_t      lit;

  always_ff @(posedge Clk)
    if (Reset)   digit <= '0;
    else if (En) digit <= digit + 2'd1;

  always_comb begin
    unique case (digit)
      2'd0: begin value = W; point = p0; end
      2'd1: begin value = X; point = p1; end
      2'd2: begin value = Y; point = p2; end
      default: begin value = Z; point = p3; end
    endcase
    lit = seg7_decode(value);
  end

  assign {AN3, AN2, AN1, AN0} = ~(4'b0001 << digit);
  assign {g, f, e, d, c, b, a} = ~lit;
  assign point_out = ~point;

endmodule
