// Four-way multiplexer of 4-bit buses with enable.
//
// {A1,A0} selects W (0), X (1), Y (2) or Z (3) onto Q while E is high; with E
// low Q is all zeros. In the dual stopwatch two of these pass the segment
// lines of the stopwatch picked by the A/B switch to the display: one carries
// segments a..d, the other e..g. The bus inputs, select and enable are those
// of the source design's mux symbol; the zero output when disabled is this
// RTL's choice. The source symbol's further pins (S_0..S_3, P_0..P_3, DP,
// Sign) are unused in the design and not described, and are not modelled.
//
// Timing: purely combinational.
module inputmux (
  input  logic [3:0] W,
  input  logic [3:0] X,
  input  logic [3:0] Y,
  input  logic [3:0] Z,
  input  logic       A0,
  input  logic       A1,
  input  logic       E,
  output logic [3:0] Q
);

  always_comb begin
    unique case ({A1, A0})
      2'd0: Q = W;
      2'd1: Q = X;
      2'd2: Q = Y;
      default: Q = Z;
    endcase
    if (!E) Q = '0;
  end

endmodule
