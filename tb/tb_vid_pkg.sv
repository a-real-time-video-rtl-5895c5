// tb_vid_pkg -- test pattern shared by the video testbenches.
// pat() gives the pixel at (field, line-in-field, column); chroma is equal
// for the two pixels of a pair so that 4:2:2 coding is lossless for it.
package tb_vid_pkg;
  import vfx_pkg::*;
  function automatic pixel_t pat(input logic f, input int line, input int x, input int seed = 0);
    pixel_t p;
    p.y  = 10'((x * 3 + line * 7 + seed + (f ? 100 : 0)) % 1024);
    p.cr = 10'(((x >> 1) * 5 + line + seed * 3) % 1024);
    p.cb = 10'(((x >> 1) * 11 + line * 2 + 17 + seed) % 1024);
    return p;
  endfunction
  // synthetic font used by font_rom_model (row byte for ROM address a)
  function automatic logic [7:0] font_glyph(input logic [10:0] a);
    if (a >= 11'(32*12) && a < 11'(33*12)) return 8'h00;
    return {a[3:0], ~a[7:4]} ^ {5'b0, a[10:8]};
  endfunction
endpackage
