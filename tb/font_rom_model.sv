// font_rom_model -- stand-in for a 128-character x 12-row font ROM with a
// one-cycle synchronous read. Glyph rows are synthetic: row byte =
// glyph(addr) = {addr[3:0], ~addr[7:4]} ^ addr[10:8], zero for character 32
// (space) so blank text renders empty.
module font_rom_model
  import tb_vid_pkg::*;
(
  input  logic        clk,
  input  logic [10:0] addr,
  output logic [7:0]  data
);
  always_ff @(posedge clk) data <= font_glyph(addr);
endmodule
