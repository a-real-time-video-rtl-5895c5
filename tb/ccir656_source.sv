// ccir656_source -- behavioural camera digitiser: a 10-bit CCIR656 NTSC
// stream of 1716-sample lines (EAV, blanking, SAV, 1440 active samples).
// Each field has BLANK_LINES lines with V = 1, then ACTIVE_LINES with V = 0.
// Active samples carry pat(f, line, x, seed) as Cb Y Cr Y.
module ccir656_source
  import vfx_pkg::*;
  import tb_vid_pkg::*;
#(
  parameter int ACTIVE_LINES = 8,
  parameter int BLANK_LINES  = 2
) (
  input  logic       clk,
  input  logic       rst,
  input  int         seed,
  output logic [9:0] dout
);
  int s, l, f;   // s = 0 is the first word of the EAV
  always_ff @(posedge clk) begin
    if (rst) begin
      s <= 0; l <= 0; f <= 0;
    end else if (s == SAMPLES_PER_LINE - 1) begin
      s <= 0;
      if (l == BLANK_LINES + ACTIVE_LINES - 1) begin l <= 0; f <= 1 - f; end
      else l <= l + 1;
    end else s <= s + 1;
  end
  function automatic logic [9:0] xy(input logic ff, vv, hh);
    return {1'b1, ff, vv, hh, vv ^ hh, ff ^ hh, ff ^ vv, ff ^ vv ^ hh, 2'b00};
  endfunction
  always_comb begin
    logic v;
    int a;
    pixel_t p;
    v = (l < BLANK_LINES);
    a = s - 276;                      // active sample index
    p = pat(f[0], l - BLANK_LINES, (a >= 0) ? a / 2 : 0, seed);
    if (s == 0 || s == 272) dout = 10'h3FF;
    else if (s == 1 || s == 2 || s == 273 || s == 274) dout = 10'h000;
    else if (s == 3) dout = xy(f[0], v, 1'b1);
    else if (s == 275) dout = xy(f[0], v, 1'b0);
    else if (s < 272) dout = s[0] ? 10'h040 : 10'h200;
    else if (v) dout = a[0] ? 10'h040 : 10'h200;
    else begin
      unique case (a % 4)
        0: dout = p.cb;
        1: dout = p.y;
        2: dout = p.cr;
        default: dout = p.y;
      endcase
    end
  end
endmodule
