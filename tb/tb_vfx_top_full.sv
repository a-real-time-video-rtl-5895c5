// tb_vfx_top_full -- the full-size end-to-end test: the processor at its
// default parameters fed a full NTSC CCIR656 stream (244 active and 19
// blanking lines per field, 1716 samples per line, 0.9 M clocks a frame),
// running the whole sequence of tb_vfx_top_core: pass-through, frame grab of
// 2 x 240 lines, full-screen and PIP still frame, bluescreen calibration on
// the 20x40 rectangle and keying, 2x/3x zoom, trace, text and cursor.
module tb_vfx_top_full;
  tb_vfx_top_core #(.AL(244), .BL(19)) core ();
endmodule
