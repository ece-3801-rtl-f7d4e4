// Testbench helpers: reference seven-segment glyphs and their inverse.
// Patterns are {g,f,e,d,c,b,a} with 1 = lit, the usual hexadecimal glyphs.
package tb_seg_pkg;
  localparam logic [6:0] GLYPH [16] = '{
    7'h3F, 7'h06, 7'h5B, 7'h4F, 7'h66, 7'h6D, 7'h7D, 7'h07,
    7'h7F, 7'h6F, 7'h77, 7'h7C, 7'h39, 7'h5E, 7'h79, 7'h71};

  // Value shown by an active-low segment pattern, or -1 if not a glyph.
  function automatic int glyph_value(input logic [6:0] seg_n);
    for (int i = 0; i < 16; i++)
      if (GLYPH[i] == ~seg_n) return i;
    return -1;
  endfunction
endpackage
