// tb_zoom -- runs the zoom block with the SRAM model for each magnification
// (2x, 3x, 4x) and checks every active output pixel against the pixel of the
// previous field it should copy: field line top + l/M, column left + x/M,
// with the window clamped into the frame (a centre request at row 0 is
// clamped so that top = 0). Also checks pass-through when disabled, the
// one-cycle latency and that writes stay inside the window.
module tb_zoom;
  import vfx_pkg::*;
  import tb_vid_pkg::*;
  localparam int AL = 8, BL = 2, LL = (AL + BL) * 1716;
  logic clk = 0, rst = 1;
  pixel_t pix, out; fvh_t fvh, fvh_o; int cur_line, frames;
  logic en = 0; logic [19:0] zpos = {10'd0, 10'd400}; logic [1:0] mag = 0;
  logic [18:0] ram_addr; logic ram_we; logic [35:0] ram_wdata, ram_rdata;
  int checks = 0, failures = 0, zoomed = 0;
  int zoomed_by_mag [3];
  always #5 clk = ~clk;
  video_source #(.ACTIVE_LINES(AL), .BLANK_LINES(BL)) src (.clk, .rst, .solid(1'b0), .solid_pix('0),
    .solid_x0(0), .solid_x1(0), .solid_l0(0), .solid_l1(0), .pix, .fvh, .cur_line, .frames);
  zoom dut (.clk, .rst, .ycrcb_in(pix), .fvh_in(fvh), .zoom_enable(en), .zoom_pos(zpos), .zoom_mag(mag),
    .ycrcb_out(out), .fvh_out(fvh_o), .ram_addr, .ram_we, .ram_wdata, .ram_rdata);
  zbt_model ram (.clk, .addr(ram_addr), .we(ram_we), .wdata(ram_wdata), .rdata(ram_rdata));

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; if (failures < 12) $display("FAIL %s at %0t", what, $time); end
  endtask

  logic checking = 0;
  pixel_t pin_q; fvh_t fvh_q; int line_q, s_q; int s_ref = 0; logic h_prev = 1; int cyc = 0;
  always @(posedge clk) if (!rst) begin
    int s_now, m, w, left;
    cyc++;
    s_now = (h_prev && !fvh.h) ? 0 : s_ref;
    h_prev <= fvh.h; s_ref <= s_now + 1;
    m = mag + 2; w = 720 / m; left = 400 - w / 2;
    if (checking && fvh_q.h == 0 && fvh_q.v == 0 && s_q < 1440) begin
      pixel_t e;
      e = en ? pat(!fvh_q.f, line_q / m, left + (s_q / 2) / m) : pin_q;
      chk(out == e, $sformatf("mag %0d line %0d x %0d got %h exp %h", m, line_q, s_q / 2, out, e));
      if (en) begin zoomed++; zoomed_by_mag[mag]++; end
    end
    if (cyc > 2) chk(fvh_o == fvh_q, "fvh delay");
    if (ram_we) chk((ram_addr % 65536) < 19'(w * (240 / m)), "write inside buffer half");
    pin_q <= pix; fvh_q <= fvh; line_q <= cur_line; s_q <= s_now;
  end

  initial begin
    repeat (3) @(posedge clk); rst = 0;
    for (int k = 0; k < 3; k++) begin
      mag = 2'(k);
      en = 0; checking = 0;
      repeat (3 * LL) @(posedge clk);
      checking = 1;
      repeat (LL) @(posedge clk);
      en = 1;
      repeat (LL) @(posedge clk);
    end
    checking = 0;
    chk(zoomed_by_mag[0] > 1000 && zoomed_by_mag[1] > 1000 && zoomed_by_mag[2] > 1000, "all magnifications exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20 * LL) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
