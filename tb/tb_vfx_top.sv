// tb_vfx_top -- end-to-end test of the processor on a reduced stream of 150
// active lines per field (a frame is 0.56 M clocks), so the whole sequence
// of tb_vfx_top_core runs quickly. The top is used with its defaults; only
// the test source is smaller than NTSC. See tb_vfx_top_core for the checks.
module tb_vfx_top;
  tb_vfx_top_core #(.AL(150), .BL(12)) core ();
endmodule
