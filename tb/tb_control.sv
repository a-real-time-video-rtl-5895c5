// tb_control -- drives the control module with mouse clicks at the GUI
// coordinates and keyboard strobes, with font ROM models on both ports.
// Checks: each check box drives its enable; the framegrab overlay enable is
// forced off by the bluescreen enable and address select follows it; the
// TRIGGER, CALIBRATE and CLEAR buttons give one pulse per click; the 2x/3x/4x
// options set zoom_mag; SET POSITION (zoom) + surface click loads zoom_pos
// without an overlay write; DRAW + a held surface press writes trace pixels
// (select 110, bit 20 set, address = surface position) each clock; the three
// overlay SET POSITION modes write select 001/011/100; no surface writes
// while the overlay is not ready; ENTER TEXT + typed keys + return writes
// all 17280 pixels of the chosen text buffer with the right glyph pixels
// and then clears the keyboard buffer; mouse_pos follows the mouse over the
// surface. Also checks the VGA output shows something and is black in
// blanking.
module tb_control;
  import vfx_pkg::*;
  import tb_vid_pkg::*;
  logic clk = 0, vclk = 0, rst = 1, vrst = 1;
  logic [19:0] mxy = 0; logic click = 0; logic [7:0] ascii = 0; logic kr = 0;
  logic hs, vs, bl; logic [2:0] rgb;
  logic [10:0] vfa, tfa; logic [7:0] vfb, tfb;
  logic bs_en, bs_cal, fg_trig, fg_sel, zoom_en, trace_en, t1_en, t2_en, fg_ov, pip;
  logic [1:0] zmag; logic [19:0] zpos, mpos; logic [2:0] osel; logic [20:0] odata;
  logic owe, oclr, ordy = 1, tbusy;
  int checks = 0, failures = 0;
  int n_trig = 0, n_cal = 0, n_clr = 0, n_we[8], n_bad_px = 0, lit = 0, blank_lit = 0;
  logic [8*48-1:0] exp_text;
  always #5 clk = ~clk;
  always #7.7 vclk = ~vclk;
  control dut (.clk, .rst, .vclk, .vrst, .mouse_xy(mxy), .mouse_click(click), .kb_ascii(ascii),
    .kb_ready(kr), .vga_hsync(hs), .vga_vsync(vs), .vga_blank(bl), .vga_rgb(rgb),
    .vga_font_addr(vfa), .vga_font_byte(vfb), .tv_font_addr(tfa), .tv_font_byte(tfb),
    .bluescreen_en(bs_en), .bluescreen_cal(bs_cal), .framegrab_trig(fg_trig),
    .framegrab_addr_select(fg_sel), .zoom_en, .zoom_mag(zmag), .zoom_pos(zpos), .trace_en,
    .text1_en(t1_en), .text2_en(t2_en), .fg_overlay_en(fg_ov), .pip_en(pip), .ovl_select(osel),
    .ovl_data(odata), .ovl_we(owe), .ovl_clear(oclr), .ovl_ready(ordy), .mouse_pos(mpos), .text_busy(tbusy));
  font_rom_model vrom (.clk(vclk), .addr(vfa), .data(vfb));
  font_rom_model trom (.clk, .addr(tfa), .data(tfb));

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; if (failures < 12) $display("FAIL %s at %0t", what, $time); end
  endtask
  function automatic logic text_px(input int r, input int c);
    logic [7:0] code, g;
    code = exp_text[8*(47-c/16) +: 8];
    g = font_glyph(11'(code[6:0] * 12 + r / 2));
    return g[7 - (c / 2) % 8] ^ code[7];
  endfunction
  logic [20:0] last_data; logic [2:0] last_sel;
  always @(posedge clk) if (!rst) begin
    if (fg_trig) n_trig++;
    if (bs_cal) n_cal++;
    if (oclr) n_clr++;
    if (owe) begin
      n_we[osel]++; last_data <= odata; last_sel <= osel;
      if (osel == SEL_TEXT1_BUF || osel == SEL_TEXT2_BUF)
        if (odata[20] != text_px(odata[14:10], odata[9:0])) n_bad_px++;
    end
  end
  always @(posedge vclk) if (!vrst) begin
    if (rgb != 0 && !bl) lit++;
    if (rgb != 0 && bl) blank_lit++;
  end

  task automatic press(input int x, input int y, input int len = 3);
    @(negedge clk); mxy = {10'(y), 10'(x)}; click = 1;
    repeat (len) @(negedge clk);
    click = 0; repeat (3) @(negedge clk);
  endtask
  task automatic key(input byte c);
    @(negedge clk); ascii = c; kr = 1; @(negedge clk); kr = 0; repeat (2) @(negedge clk);
  endtask
  task automatic clear_counts();
    for (int i = 0; i < 8; i++) n_we[i] = 0;
  endtask

  initial begin
    repeat (4) @(posedge clk); @(negedge clk) rst = 0; vrst = 0;
    chk(!bs_en && !zoom_en && !trace_en && !t1_en && !t2_en && !fg_ov && !pip && zmag == 0,
        "all off after reset");
    // check boxes
    press(55, 260); chk(bs_en && fg_sel, "bluescreen enable + address select");
    press(515, 668); chk(!fg_ov, "framegrab overlay forced off by bluescreen");
    press(55, 260); chk(!bs_en && !fg_sel && fg_ov, "framegrab overlay on when bluescreen off");
    press(55, 515); chk(zoom_en, "zoom enable");
    press(515, 604); chk(t1_en, "text1 enable");
    press(515, 636); chk(t2_en, "text2 enable");
    press(515, 700); chk(trace_en, "trace enable");
    press(771, 668); chk(pip, "pip enable");
    press(515, 604); chk(!t1_en, "text1 disable");
    // pushbuttons through level-to-pulse
    press(60, 130, 10); press(70, 135, 4); chk(n_trig == 2, $sformatf("trigger pulses %0d", n_trig));
    press(60, 292, 10); chk(n_cal == 1, "calibrate pulse");
    press(650, 700, 6); chk(n_clr == 1, "trace clear pulse");
    press(20, 130, 6); chk(n_trig == 2, "click beside a button does nothing");
    // zoom options
    press(55, 568); chk(zmag == 1, "3x");
    press(55, 588); chk(zmag == 2, "4x");
    press(55, 548); chk(zmag == 0, "2x");
    // zoom centre from the surface
    clear_counts();
    press(60, 620); press(304 + 100, 50);
    chk(zpos == {10'd50, 10'd100}, $sformatf("zoom position %h", zpos));
    chk(n_we.sum() == 0, "no overlay write in zoom mode");
    // trace drawing
    press(780, 700); clear_counts();
    press(304 + 200, 30, 5);
    chk(n_we[SEL_TRACE_BUF] == 5 && last_data == {1'b1, 10'd30, 10'd200}, "trace writes");
    @(negedge clk) mxy = {10'd77, 10'(304 + 33)}; @(negedge clk);
    chk(mpos == {10'd77, 10'd33}, "mouse position on surface");
    // overlay positions
    press(650, 604); clear_counts(); press(304 + 10, 20);
    chk(n_we[SEL_TEXT1_POS] >= 1 && last_sel == SEL_TEXT1_POS && last_data == {1'b0, 10'd20, 10'd10}, "text1 position");
    press(650, 636); press(304 + 11, 21);
    chk(last_sel == SEL_TEXT2_POS && last_data == {1'b0, 10'd21, 10'd11}, "text2 position");
    press(650, 668); press(304 + 12, 22);
    chk(last_sel == SEL_FG_POS && last_data == {1'b0, 10'd22, 10'd12}, "framegrab position");
    ordy = 0; clear_counts(); press(304 + 50, 50);
    chk(n_we.sum() == 0, "no writes while overlay not ready");
    ordy = 1;
    // text render into buffer 1
    press(780, 604);
    exp_text = {"AB", {46{8'd32}}};
    clear_counts(); key("A"); key("B"); key(13);
    wait (n_we[SEL_TEXT1_BUF] == 17280); repeat (20) @(negedge clk);
    chk(n_we[SEL_TEXT1_BUF] == 17280 && n_we.sum() == 17280, $sformatf("text1 writes %0d", n_we.sum()));
    chk(n_bad_px == 0, $sformatf("text pixels (%0d wrong)", n_bad_px));
    // the buffer was cleared: next text starts fresh, into buffer 2
    press(780, 636);
    exp_text = {8'hC3, {47{8'd32}}};
    clear_counts(); key(8'hC3); key(13);
    wait (n_we[SEL_TEXT2_BUF] == 17280); repeat (20) @(negedge clk);
    chk(n_we[SEL_TEXT2_BUF] == 17280 && n_bad_px == 0, "text2 writes after keyboard buffer cleared");
    // return with no text buffer chosen does nothing
    clear_counts(); key("Z"); key(13); repeat (100) @(negedge clk);
    chk(n_we.sum() == 0, "return without ENTER TEXT ignored");
    // VGA: run one frame
    repeat (1344 * 810) @(posedge vclk);
    chk(lit > 2000, $sformatf("GUI drawn (%0d lit pixels)", lit));
    chk(blank_lit == 0, "black during blanking");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000000; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
