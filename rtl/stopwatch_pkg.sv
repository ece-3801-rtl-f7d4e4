// Shared types and helpers for the dual stopwatch.
//
// A digit of the stopwatch is a 4-bit BCD value. The seven-segment pattern
// type holds one bit per segment, bit 0 = segment a up to bit 6 = segment g,
// with 1 meaning "segment lit"; the display driver inverts it for the
// active-low segment pins of the board. The decoder covers all sixteen codes
// (hexadecimal glyphs above 9) although the counters only produce 0 to 9;
// that coverage is this design's choice.
package stopwatch_pkg;

  typedef logic [3:0] bcd_t;
  typedef logic [6:0] seg7_t;   // {g,f,e,d,c,b,a}, 1 = lit

  function automatic seg7_t seg7_decode(input bcd_t v);
    unique case (v)
      4'h0: return 7'b011_1111;
      4'h1: return 7'b000_0110;
      4'h2: return 7'b101_1011;
      4'h3: return 7'b100_1111;
      4'h4: return 7'b110_0110;
      4'h5: return 7'b110_1101;
      4'h6: return 7'b111_1101;
      4'h7: return 7'b000_0111;
      4'h8: return 7'b111_1111;
      4'h9: return 7'b110_1111;
      4'hA: return 7'b111_0111;
      4'hB: return 7'b111_1100;
      4'hC: return 7'b011_1001;
      4'hD: return 7'b101_1110;
      4'hE: return 7'b111_1001;
      default: return 7'b111_0001;  // F
    endcase
  endfunction

endpackage
