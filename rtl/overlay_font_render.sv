// overlay_font_render -- produces the 1-bit pixel of typed text for a text
// overlay buffer address.
//
// Follows the document's overlay text renderer: text is drawn at the
// top-left of the buffer with every font pixel doubled in both directions,
// so a character is 16 buffer columns by 24 buffer rows (8x12 font, 12 rows
// per character in the ROM). Character index = col/16, glyph column =
// (col/2) mod 8, font row = row/2, ROM address = code[6:0]*12 + font row,
// bit 7 of the code inverts the glyph.
// Interface and timing: row/col/valid in; font_addr goes to a font ROM
// with one clock of read latency and font_byte comes back one clock later.
// The outputs (pixel, and row/col/valid delayed to match) are valid one
// clock after the inputs. The document compensated the ROM latency by
// offsetting hcount by one; this design delays the address instead.
module overlay_font_render #(
  parameter int NCHAR = 48
) (
  input  logic               clk,
  input  logic [4:0]         row,
  input  logic [9:0]         col,
  input  logic               valid,
  input  logic [8*NCHAR-1:0] text,
  output logic [10:0]        font_addr,
  input  logic [7:0]         font_byte,
  output logic [4:0]         row_out,
  output logic [9:0]         col_out,
  output logic               valid_out,
  output logic               pixel
);
  logic [5:0] cidx;
  logic [7:0] code;
  logic       reverse;
  assign cidx = 6'(col >> 4);
  always_comb begin
    code = 8'd32;
    if (int'(cidx) < NCHAR) code = text[8*(NCHAR-1-int'(cidx)) +: 8];
  end
  assign font_addr = 11'(code[6:0] * 12) + 11'(row >> 1);

  always_ff @(posedge clk) begin
    row_out   <= row;
    col_out   <= col;
    valid_out <= valid;
    reverse   <= code[7];
  end
  assign pixel = font_byte[3'd7 - col_out[3:1]] ^ reverse;
endmodule
