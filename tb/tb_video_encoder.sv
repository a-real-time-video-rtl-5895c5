// tb_video_encoder -- drives decoded-format video into the encoder and
// parses its 10-bit output: every SAV must be followed by the 1440 Cb Y Cr Y
// samples of the expected line, then the EAV; timecode XY words must carry
// the right F/V/H and protection bits; lines must be 1716 samples long.
module tb_video_encoder;
  import vfx_pkg::*;
  import tb_vid_pkg::*;
  localparam int AL = 5, BL = 2;
  logic clk = 0, rst = 1;
  pixel_t pix; fvh_t fvh; int cur_line, frames;
  logic [9:0] tv;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  video_source #(.ACTIVE_LINES(AL), .BLANK_LINES(BL)) src (.clk, .rst, .solid(1'b0), .solid_pix('0),
    .solid_x0(0), .solid_x1(0), .solid_l0(0), .solid_l1(0), .pix, .fvh, .cur_line, .frames);
  video_encoder dut (.clk, .rst, .ycrcb_in(pix), .fvh_in(fvh), .tv_out(tv));

  function automatic logic [9:0] xy(input logic ff, vv, hh);
    return {1'b1, ff, vv, hh, vv ^ hh, ff ^ hh, ff ^ vv, ff ^ vv ^ hh, 2'b00};
  endfunction
  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; if (failures < 12) $display("FAIL %s at %0t", what, $time); end
  endtask

  logic [9:0] w1, w2, w3;
  int k = -100, last_sav = -1, t = 0, aline = 0, sav_count = 0, act_lines = 0;
  logic cur_v, cur_f;
  initial begin repeat (3) @(posedge clk); rst = 0; end
  always @(posedge clk) if (!rst) begin
    t++;
    w3 <= w2; w2 <= w1; w1 <= tv;
    if (w3 == 10'h3FC && w2 == 0 && w1 == 0 && tv[9]) begin
      if (!tv[6]) begin                         // SAV
        cur_f = tv[8]; cur_v = tv[7];
        chk(tv == xy(cur_f, cur_v, 1'b0), "SAV protection bits");
        if (last_sav >= 0 && sav_count > 2) chk(t - last_sav == 1716, "line length");
        last_sav = t; sav_count++;
        k = -1;
        if (cur_v) aline = 0; else begin aline++; act_lines++; end
      end else begin                            // EAV
        chk(tv == xy(cur_f, cur_v, 1'b1), "EAV protection bits");
        if (sav_count > 0) chk(k == 1443, "EAV position");
      end
    end else if (k >= 0 && k < 1440 && !cur_v && sav_count > 2) begin
      pixel_t e0, e1;
      e0 = pat(cur_f, aline - 1, (k / 4) * 2);
      e1 = pat(cur_f, aline - 1, (k / 4) * 2 + 1);
      unique case (k % 4)
        0: chk(tv == e0.cb, "Cb");
        1: chk(tv == e0.y,  "Y even");
        2: chk(tv == e1.cr, "Cr");
        3: chk(tv == e1.y,  "Y odd");
      endcase
    end
    if (sav_count > 0) k++;
  end
  initial begin
    repeat (4 * (AL + BL) * 1716) @(posedge clk);
    chk(act_lines >= 3 * AL, "active line count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
