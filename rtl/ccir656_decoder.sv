// ccir656_decoder -- 10-bit CCIR656 stream to 30-bit YCrCb pixels plus fvh.
//
// The camera digitiser delivers one 10-bit word per 27 MHz clock: timing
// reference codes (3FF 000 000 XY) mark the end (EAV) and start (SAV) of
// active video, and between an SAV and the next EAV come 1440 samples in the
// order Cb0 Y0 Cr0 Y1 Cb2 Y2 ... . The decoder recognises the reference codes
// (only the upper eight bits of the 3FF word are compared, so 8-bit sources
// padded with 00 also match), takes F, V and H from the XY word, gathers each
// Cb/Y/Cr/Y group and emits the two pixels of the group, each held for two
// clocks. Both pixels of a group carry the group's Cb and Cr.
//
// Timing: the fvh output is delayed so that the cycle in which fvh_out.h
// falls is the first cycle of pixel 0 of the line; from then on pixel n is
// on ycrcb_out during the two cycles 2n and 2n+1 after that edge. The
// latency from the SAV XY word to pixel 0 is 5 clocks.
// The document names this block and its function only; the group-wise
// chroma pairing and the output alignment are this design's own choices.
// Lint: the two low bits of the delayed word d3 are unused because a timing
// reference is recognised on its top 8 bits only (8-bit sources send 3FC).
module ccir656_decoder
  import vfx_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic [9:0] din,
  output pixel_t     ycrcb_out,
  output fvh_t       fvh_out
);
  logic [9:0] d1, d2, d3;         // previous three words
  logic       is_trs;             // current word is the XY of a timing reference
  fvh_t       fvh_cur;
  fvh_t       fvh_dly [4];
  logic [1:0] phase;
  logic [9:0] cb_r, y0_r, cr_r;
  pixel_t     pend;

  assign is_trs = (d3[9:2] == 8'hFF) && (d2 == 10'h000) && (d1 == 10'h000) && din[9];

  always_ff @(posedge clk) begin
    if (rst) begin
      d1 <= '0; d2 <= '0; d3 <= '0;
      fvh_cur   <= '{f: 1'b0, v: 1'b1, h: 1'b1};
      phase     <= '0;
      cb_r <= '0; y0_r <= '0; cr_r <= '0;
      pend      <= '0;
      ycrcb_out <= '0;
      for (int i = 0; i < 4; i++) fvh_dly[i] <= '{f: 1'b0, v: 1'b1, h: 1'b1};
    end else begin
      d1 <= din; d2 <= d1; d3 <= d2;
      if (is_trs) begin
        fvh_cur <= '{f: din[8], v: din[7], h: din[6]};
        phase   <= '0;
      end else begin
        phase <= phase + 2'd1;
        unique case (phase)
          2'd0: cb_r <= din;
          2'd1: y0_r <= din;
          2'd2: cr_r <= din;
          2'd3: begin
            ycrcb_out <= '{y: y0_r, cr: cr_r, cb: cb_r};
            pend      <= '{y: din,  cr: cr_r, cb: cb_r};
          end
        endcase
        if (phase == 2'd1) ycrcb_out <= pend;
      end
      fvh_dly[0] <= fvh_cur;
      for (int i = 1; i < 4; i++) fvh_dly[i] <= fvh_dly[i-1];
    end
  end

  assign fvh_out = fvh_dly[3];
endmodule
