// text_display -- draws a line of NCHAR characters on the VGA screen.
//
// Plays the part of the document's string display: the character cell is
// 8x12 pixels, the font ROM holds 12 bytes per character (address =
// code[6:0]*12 + row), bit 7 of the code inverts the glyph, and ROM reads
// start 16 pixels (two characters) before the first character so the data
// is there in time. font_addr is zero whenever this block is not fetching,
// so the addresses of all blocks can be ORed together onto one ROM.
// Timing (this design's choice): font_byte must arrive two vclk cycles
// after font_addr (one register on the ORed address, one in the ROM). Each
// byte is held in a look-ahead register and moved to the shift register at
// the first pixel of its character. pixel is combinational from hcount/
// vcount (COLOR where the glyph is set, else 0). X must be at least 9.
// text holds character 0 in its top byte.
module text_display #(
  parameter int NCHAR = 8,
  parameter int X = 0,
  parameter int Y = 0,
  parameter logic [2:0] COLOR = 3'd7
) (
  input  logic               vclk,
  input  logic [10:0]        hcount,
  input  logic [9:0]         vcount,
  input  logic [8*NCHAR-1:0] text,
  output logic [10:0]        font_addr,
  input  logic [7:0]         font_byte,
  output logic [2:0]         pixel
);
  localparam int LEN = 8 * NCHAR;
  int  rel, vrow, fpos;
  logic [7:0] code, nxt, cur, now;
  logic       rev_nxt, rev_cur, rev_now, row_ok, in_text;

  always_comb begin
    rel    = int'(hcount) - X;
    vrow   = int'(vcount) - Y;
    row_ok = (vrow >= 0) && (vrow < 12);
    fpos   = rel + 16;
    code   = 8'd0;
    if (fpos >= 0 && fpos < LEN) code = text[8*(NCHAR-1-fpos/8) +: 8];
    font_addr = (row_ok && fpos >= 0 && fpos < LEN) ? 11'(code[6:0] * 12 + vrow) : 11'd0;
  end

  // inversion bit of the character whose byte is arriving now (address sent 2 clocks ago)
  logic rev_d1, rev_d2;
  always_ff @(posedge vclk) begin
    rev_d1 <= code[7];
    rev_d2 <= rev_d1;
    if (row_ok && ((rel + 14) % 8 == 7) && rel + 14 >= 0 && rel + 14 < LEN) begin
      nxt     <= font_byte;
      rev_nxt <= rev_d2;
    end
    cur     <= now;
    rev_cur <= rev_now;
  end

  always_comb begin
    in_text = row_ok && rel >= 0 && rel < LEN;
    now     = (rel % 8 == 0) ? nxt : cur;
    rev_now = (rel % 8 == 0) ? rev_nxt : rev_cur;
    pixel   = (in_text && (now[3'(7 - rel % 8)] ^ rev_now)) ? COLOR : 3'd0;
  end
endmodule
