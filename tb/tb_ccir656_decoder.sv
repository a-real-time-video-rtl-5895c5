// tb_ccir656_decoder -- feeds a synthetic CCIR656 stream (two frames, 6
// active lines per field) into the decoder and checks every decoded pixel
// against the pattern, the alignment of pixel 0 with the fall of h, the
// field flag and the number of active lines per field.
module tb_ccir656_decoder;
  import vfx_pkg::*;
  import tb_vid_pkg::*;
  localparam int AL = 6, BL = 2;
  logic clk = 0, rst = 1;
  logic [9:0] din;
  pixel_t pix;
  fvh_t fvh;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  ccir656_source #(.ACTIVE_LINES(AL), .BLANK_LINES(BL)) src (.clk, .rst, .seed(0), .dout(din));
  ccir656_decoder dut (.clk, .rst, .din, .ycrcb_out(pix), .fvh_out(fvh));

  int k, line, lines_in_field, fields_seen;
  logic h_q = 1, v_q = 1;
  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
  end
  always @(posedge clk) if (!rst) begin
    h_q <= fvh.h; v_q <= fvh.v;
    if (v_q == 0 && fvh.v == 1) begin
      fields_seen++;
      if (fields_seen > 1) begin
        checks++;
        if (lines_in_field != AL) begin failures++; $display("FAIL lines per field %0d", lines_in_field); end
      end
      lines_in_field = 0;
    end
    if (h_q && !fvh.h) begin k = 0; if (!fvh.v) lines_in_field++; end
    else k++;
    if (!fvh.v && !fvh.h && k < 1440 && fields_seen > 0) begin
      pixel_t e;
      e = pat(fvh.f, lines_in_field - 1, k / 2);
      checks++;
      if (pix !== e) begin
        failures++;
        if (failures < 10) $display("FAIL f=%0d line=%0d k=%0d got %h exp %h", fvh.f, lines_in_field-1, k, pix, e);
      end
    end
  end
  initial begin
    repeat (4 * (AL + BL) * 1716 + 4000) @(posedge clk);
    checks++;
    if (fields_seen < 4) begin failures++; $display("FAIL only %0d fields", fields_seen); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
