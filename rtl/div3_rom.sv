// div3_rom -- lookup table giving floor(a / 3) for a = 0..1023.
// Used by the zoom block to scale the pixel and line counters for the 3x
// magnification. The table is filled by a loop at elaboration, which
// synthesis turns into a ROM; the read is combinational.
module div3_rom (
  input  logic [9:0] a,
  output logic [8:0] q
);
  logic [8:0] rom [1024];
  initial for (int i = 0; i < 1024; i++) rom[i] = 9'(i / 3);
  assign q = rom[a];
endmodule
