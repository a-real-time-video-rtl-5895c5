// video_source -- behavioural source of decoded video (pixel + fvh), in the
// timing the decoder produces: per line h falls on pixel 0, stays low for
// 1444 samples and is high for the remaining 272; v and f change together
// with the fall of h. Each field has BLANK_LINES lines with v = 1 followed
// by ACTIVE_LINES lines with v = 0. Pixel (f, line, x) = pat(f, line, x, SEED)
// unless `solid` is set, in which case `solid_pix` is sent inside the box
// given by the solid_* ports, with (x mod 4) added to its luma.
module video_source
  import vfx_pkg::*;
  import tb_vid_pkg::*;
#(
  parameter int ACTIVE_LINES = 8,
  parameter int BLANK_LINES  = 2,
  parameter int SEED = 0
) (
  input  logic   clk,
  input  logic   rst,
  input  logic   solid,
  input  pixel_t solid_pix,
  input  int     solid_x0, solid_x1, solid_l0, solid_l1,
  output pixel_t pix,
  output fvh_t   fvh,
  output int     cur_line,      // line within field (active lines from 0), -1 in blanking
  output int     frames
);
  int s, l, f;
  always_ff @(posedge clk) begin
    if (rst) begin
      s <= 0; l <= 0; f <= 0; frames <= 0;
    end else begin
      if (s == SAMPLES_PER_LINE - 1) begin
        s <= 0;
        if (l == BLANK_LINES + ACTIVE_LINES - 1) begin
          l <= 0;
          f <= 1 - f;
          if (f == 1) frames <= frames + 1;
        end else l <= l + 1;
      end else s <= s + 1;
    end
  end
  always_comb begin
    int al;
    al = l - BLANK_LINES;
    fvh.f = f[0];
    fvh.v = (l < BLANK_LINES);
    fvh.h = (s >= 1444);
    cur_line = fvh.v ? -1 : al;
    if (s < 1440 && !fvh.v) begin
      if (solid && (s/2) >= solid_x0 && (s/2) < solid_x1 && al >= solid_l0 && al < solid_l1)
        begin pix = solid_pix; pix.y = solid_pix.y + 10'((s/2) % 4); end
      else
        pix = pat(f[0], al, s/2, SEED);
    end else pix = '{y: 10'h040, cr: 10'h200, cb: 10'h200};
  end
endmodule
