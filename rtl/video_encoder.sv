// video_encoder -- 30-bit YCrCb pixels plus fvh to a 10-bit CCIR656 stream.
//
// This is the output module that feeds the TV encoder chip. A sample counter
// runs 0..1715 over each NTSC line and is re-locked to 0 on the first cycle of
// active video (falling edge of h). Samples 0..1439 carry the picture in the
// order Cb Y Cr Y, taking Cb and the first Y from an even pixel and Cr and the
// second Y from the following odd pixel. Samples 1440..1443 are the EAV code
// (3FC 000 000 XY), 1444..1711 blanking levels (200 for chroma, 040 for luma)
// and 1712..1715 the SAV code for the next line. XY = {1, F, V, H, V^H, F^H,
// F^V, F^V^H} followed by two zero bits, with H = 1 in the EAV and 0 in the
// SAV.
//
// Timing: the stream is four samples behind the input, so that the SAV of a
// line, which precedes the line's first pixel, can already use that line's F
// and V flags. tv_out is registered: total latency from a pixel to its first
// sample on tv_out is 5 clocks.
// The sample layout and the timecodes follow the document; the four-sample
// lookahead and forcing H in the timecodes are this design's own choices.
// Lint: bit 0 of the delayed fvh word (h) is unused at the output stage,
// since H in the timecodes comes from the sample counter.
module video_encoder
  import vfx_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  pixel_t     ycrcb_in,
  input  fvh_t       fvh_in,
  output logic [9:0] tv_out
);
  localparam int unsigned LOOK = 4;

  logic        h_q;
  logic [10:0] cin_q, cin, cout;
  pixel_t      pix_dly [LOOK];
  fvh_t        fvh_dly [LOOK];
  logic [7:0]  xy_eav, xy_sav;
  pixel_t      p;
  fvh_t        fe;

  // input-side counter, 0 on the first active sample
  assign cin  = (h_q & ~fvh_in.h) ? 11'd0 : cin_q;
  // output-side counter, LOOK samples behind
  assign cout = (cin >= 11'(LOOK)) ? cin - 11'(LOOK) : cin + 11'(SAMPLES_PER_LINE - LOOK);

  assign p  = pix_dly[LOOK-1];
  assign fe = fvh_dly[LOOK-1];
  // EAV: flags of the line that is ending (delayed copy); SAV: flags of the
  // line about to start (current input).
  assign xy_eav = {1'b1, fe.f, fe.v, 1'b1, fe.v ^ 1'b1, fe.f ^ 1'b1, fe.f ^ fe.v, fe.f ^ fe.v ^ 1'b1};
  assign xy_sav = {1'b1, fvh_in.f, fvh_in.v, 1'b0, fvh_in.v, fvh_in.f,
                   fvh_in.f ^ fvh_in.v, fvh_in.f ^ fvh_in.v};

  always_ff @(posedge clk) begin
    if (rst) begin
      h_q    <= 1'b1;
      cin_q  <= '0;
      tv_out <= 10'h040;
      for (int i = 0; i < LOOK; i++) begin
        pix_dly[i] <= '0;
        fvh_dly[i] <= '{f: 1'b0, v: 1'b1, h: 1'b1};
      end
    end else begin
      h_q   <= fvh_in.h;
      cin_q <= (cin == 11'(SAMPLES_PER_LINE - 1)) ? 11'd0 : cin + 11'd1;
      pix_dly[0] <= ycrcb_in;
      fvh_dly[0] <= fvh_in;
      for (int i = 1; i < LOOK; i++) begin
        pix_dly[i] <= pix_dly[i-1];
        fvh_dly[i] <= fvh_dly[i-1];
      end
      if (cout < 11'(ACTIVE_SAMPLES)) begin
        unique case (cout[1:0])
          2'b00: tv_out <= p.cb;
          2'b01: tv_out <= p.y;
          2'b10: tv_out <= p.cr;
          2'b11: tv_out <= p.y;
        endcase
      end else if (cout == 11'd1440 || cout == 11'd1712) tv_out <= 10'h3FC;
      else if (cout == 11'd1441 || cout == 11'd1442 ||
               cout == 11'd1713 || cout == 11'd1714) tv_out <= 10'h000;
      else if (cout == 11'd1443) tv_out <= {xy_eav, 2'b00};
      else if (cout == 11'd1715) tv_out <= {xy_sav, 2'b00};
      else tv_out <= cout[0] ? 10'h040 : 10'h200;
    end
  end
endmodule
