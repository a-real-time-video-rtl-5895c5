// tb_vfx_top_core -- end-to-end test of the whole processor (vfx_top with
// its default parameters) on a CCIR656 stream of AL active lines per field,
// with
// models of both ZBT banks and of the font ROM, and the mouse and keyboard
// driven at the GUI's coordinates. tv_out is parsed back into lines; each
// active output line is compared with what the current mode must give.
// Mechanisms counted (each must be seen at least once):
//   pass      every sample equals the live input (all effects off)
//   grab      TRIGGER stores exactly one frame (2 x min(AL,240) x 720 writes)
//   fg_full   still frame replaces the live picture (live seed changed)
//   pip       half-size still frame inside the PIP window at the set position
//   bs_cal    bluescreen calibration runs; bs_repl/bs_keep: keyed output
//             holds only live or still-frame samples, both present
//   zoom2/3   mode switch 2x -> 3x: luma repeats in pairs / triples
//   trace     a freehand pixel drawn on the surface shows white
//   stall     text render waits while the overlay clears the trace buffer
//   text      the typed text appears at its set position, glyph for glyph
//   cleared   after CLEAR the trace pixel is gone
//   cursor    the mouse cross is drawn at the mouse position
//   vga       the GUI is drawn and the VGA syncs run
module tb_vfx_top_core #(
  parameter int AL = 150,   // active lines per field
  parameter int BL = 12     // blanking lines per field
);
  import vfx_pkg::*;
  import tb_vid_pkg::*;
  localparam int LL = 1716, FRAME = 2 * (AL + BL) * LL;
  localparam int GRAB_LINES = (AL < 240) ? AL : 240;   // framegrab keeps 240 lines per field
  logic clk = 0, vclk = 0, rst = 1;
  int seed = 0;
  logic [9:0] tv_in, tv_out;
  logic [19:0] mxy = {10'd400, 10'd904}; logic click = 0; logic [7:0] ascii = 0; logic kr = 0;
  logic hs, vs, bl; logic [2:0] rgb;
  logic [10:0] vfa, tfa; logic [7:0] vfb, tfb;
  logic [18:0] a0, a1; logic we0, we1; logic [35:0] wd0, wd1, rd0, rd1;
  logic [1:0] fg_state; logic bs_calib, ovl_ready, text_busy;
  always #5 clk = ~clk;
  always #7.7 vclk = ~vclk;

  ccir656_source #(.ACTIVE_LINES(AL), .BLANK_LINES(BL)) src (.clk, .rst, .seed, .dout(tv_in));
  vfx_top dut (.clk_tv(clk), .clk_vga(vclk), .rst, .tv_in, .tv_out, .mouse_xy(mxy), .mouse_click(click),
    .kb_ascii(ascii), .kb_ready(kr), .vga_hsync(hs), .vga_vsync(vs), .vga_blank(bl), .vga_rgb(rgb),
    .vga_font_addr(vfa), .vga_font_byte(vfb), .tv_font_addr(tfa), .tv_font_byte(tfb),
    .ram0_addr(a0), .ram0_we(we0), .ram0_wdata(wd0), .ram0_rdata(rd0),
    .ram1_addr(a1), .ram1_we(we1), .ram1_wdata(wd1), .ram1_rdata(rd1),
    .fg_state, .bs_calibrating(bs_calib), .overlay_ready(ovl_ready), .text_busy);
  zbt_model ram0 (.clk, .addr(a0), .we(we0), .wdata(wd0), .rdata(rd0));
  zbt_model ram1 (.clk, .addr(a1), .we(we1), .wdata(wd1), .rdata(rd1));
  font_rom_model vrom (.clk(vclk), .addr(vfa), .data(vfb));
  font_rom_model trom (.clk, .addr(tfa), .data(tfb));

  int checks = 0, failures = 0;
  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; if (failures < 15) $display("FAIL %s at %0t", what, $time); end
  endtask

  // ---------------- mechanism counters ----------------
  int n_pass, n_grab_writes, n_fg, n_pip, n_bs_cal, n_bs_repl, n_bs_keep, n_zoom2, n_zoom3,
      n_trace, n_stall, n_text, n_cleared, n_cursor, n_vga_lit, n_hsync;

  // ---------------- output parser ----------------
  typedef enum {M_OFF, M_PASS, M_FG, M_PIP, M_BS, M_ZOOM2, M_ZOOM3, M_OVL} mode_e;
  mode_e mode = M_OFF;
  int grab_seed = 0, pip_r = 0, pip_c = 0, txt_r = 0, txt_c = 0;
  logic txt_on = 0, trace_on = 0, trace_expect = 0;
  logic [8*48-1:0] txt;
  logic [9:0] w1, w2, w3;
  logic of = 0, ov = 1, collecting = 0; int oline = -1, ok = 0;
  logic [9:0] ys [720]; logic [9:0] cs [1440];

  function automatic logic [9:0] comp(input pixel_t p, input int a);
    unique case (a % 4) 0: return p.cb; 2: return p.cr; default: return p.y; endcase
  endfunction
  function automatic logic cursor_at(input int r, input int x);
    int mr, mc, mx, my;
    // surface position as the GUI maps it: surface at (304,0), 720x525
    mx = int'(mxy[9:0]); my = int'(mxy[19:10]);
    mc = (mx < 304 || mx > 304 + 720) ? 0 : mx - 304;
    mr = (my > 525) ? 0 : my;
    return (r == mr && x >= mc - 4 && x <= mc + 4) || (x == mc && r >= mr - 4 && r <= mr + 4);
  endfunction
  function automatic logic text_bit(input int r, input int x);
    logic [7:0] code, g; int tr, tc;
    tr = r - txt_r; tc = x - txt_c;
    if (!txt_on || tr < 0 || tr >= 24 || tc < 0 || tc >= 720) return 0;
    code = txt[8*(47 - tc / 16) +: 8];
    g = font_glyph(11'(code[6:0] * 12 + tr / 2));
    return g[7 - (tc / 2) % 8] ^ code[7];
  endfunction

  // what the framegrab holds: the grabbed frame, zero where nothing was stored
  function automatic pixel_t grab_px(input logic f, input int l, input int x);
    return (l < GRAB_LINES) ? pat(f, l, x, grab_seed) : pixel_t'(0);
  endfunction

  task automatic do_line(input logic f, input int l);
    int r; r = 2 * l + f;
    if (mode == M_ZOOM2 || mode == M_ZOOM3) begin
      for (int x = 0; x + 2 < 720; x += 2) begin
        if (mode == M_ZOOM2 && ys[x] == ys[x + 1] && ys[x] != ys[x + 2]) n_zoom2++;
        if (mode == M_ZOOM3 && ys[x] == ys[x + 1] && ys[x] == ys[x + 2] && x % 6 == 0) n_zoom3++;
      end
      return;
    end
    for (int x = 0; x < 720; x++) begin
      pixel_t live, e; logic white; int rr, xx;
      live = pat(f, l, x, seed);
      white = cursor_at(r, x);
      if (white) n_cursor++;
      e = live;
      if (mode == M_FG) e = grab_px(f, l, x);
      if (mode == M_PIP) begin
        rr = 2 * (r - pip_r); xx = 2 * (x - pip_c);
        // 240 x 360 window; rows the small test frame never stored read as zero
        if (r >= pip_r && r - pip_r < 240 && x >= pip_c && x - pip_c < 360)
          e = grab_px(1'b0, rr / 2, xx);
      end
      if (mode == M_OVL) begin
        if (trace_on && r / 2 == 30 && x == 200) begin
          if (trace_expect) begin white = 1; n_trace++; end
          else begin chk(ys[x] == live.y, "trace pixel cleared"); n_cleared++; end
        end
        if (text_bit(r, x)) begin white = 1; n_text++; end
      end
      if (mode == M_BS) begin
        pixel_t g; g = grab_px(f, l, x);
        if (!white) begin
          chk(ys[x] == live.y || ys[x] == g.y, $sformatf("keyed luma r%0d x%0d", r, x));
          if (ys[x] == g.y && g.y != live.y) n_bs_repl++;
          if (ys[x] == live.y && g.y != live.y) n_bs_keep++;
        end
        continue;
      end
      if (white) chk(ys[x] == WHITE.y, $sformatf("white at r%0d x%0d got %0d", r, x, ys[x]));
      else begin
        chk(ys[x] == e.y, $sformatf("mode %s luma r%0d x%0d got %0d exp %0d", mode.name(), r, x, ys[x], e.y));
        if (mode == M_PASS) n_pass++;
        if (mode == M_FG && e.y != live.y) n_fg++;
        if (mode == M_PIP && e.y != live.y) n_pip++;
      end
      // chroma where the whole pair is plain video and the mode keeps pairs intact
      if ((mode == M_PASS || mode == M_FG) && x % 2 == 1 && !white && !cursor_at(r, x - 1))
        chk(cs[2 * (x - 1)] == comp(e, 0) && cs[2 * (x - 1) + 2] == comp(e, 2), $sformatf("chroma r%0d x%0d", r, x));
    end
  endtask

  always @(posedge clk) if (!rst) begin
    w1 <= tv_out; w2 <= w1; w3 <= w2;
    if (collecting) begin
      if (ok % 2 == 1) ys[ok / 2] = tv_out; else cs[ok] = tv_out;
      if (ok == 1439) begin
        collecting <= 0;
        if (mode != M_OFF) do_line(of, oline);
      end
      ok <= ok + 1;
    end
    if (w3[9:2] == 8'hFF && w2 == 0 && w1 == 0 && tv_out[9]) begin
      of <= tv_out[8]; ov <= tv_out[7];
      if (tv_out[7]) oline <= -1;
      else if (!tv_out[6]) begin oline <= oline + 1; collecting <= 1; ok <= 0; end
    end
  end

  // ---------------- other monitors ----------------
  always @(posedge clk) if (!rst) begin
    if (we0) n_grab_writes++;
    if (bs_calib) n_bs_cal++;
    if (text_busy && !ovl_ready) n_stall++;
  end
  logic hs_q = 1;
  always @(posedge vclk) begin
    if (rgb != 0) n_vga_lit++;
    if (hs_q && !hs) n_hsync++;
    hs_q <= hs;
  end

  // ---------------- stimulus ----------------
  task automatic press(input int x, input int y, input int len = 3);
    @(negedge clk); mxy = {10'(y), 10'(x)}; click = 1;
    repeat (len) @(negedge clk);
    click = 0; repeat (3) @(negedge clk);
  endtask
  task automatic park(); @(negedge clk); mxy = {10'd400, 10'd904}; endtask
  task automatic key(input byte c);
    @(negedge clk); ascii = c; kr = 1; @(negedge clk); kr = 0; repeat (2) @(negedge clk);
  endtask
  task automatic frames(input int n); repeat (n * FRAME) @(posedge clk); endtask
  // switch mode at a field boundary after one settling frame
  task automatic run(input mode_e m, input int n);
    mode = M_OFF; frames(1); mode = m; frames(n); mode = M_OFF;
  endtask

  int zoom2_before;
  initial begin
    repeat (4) @(posedge clk); @(negedge clk) rst = 0;
    wait (ovl_ready);
    run(M_PASS, 1);
    chk(n_pass > 2 * AL * 700, $sformatf("pass-through samples %0d", n_pass));
    // framegrab
    press(60, 130); park();
    wait (fg_state != 0); wait (fg_state == 0);
    chk(n_grab_writes == 2 * GRAB_LINES * 720, $sformatf("frame grab writes %0d", n_grab_writes));
    grab_seed = 0; seed = 7;
    run(M_PASS, 1);
    // full-screen still frame, then PIP at (20,100)
    press(515, 668); park();
    run(M_FG, 1);
    press(650, 668); press(304 + 100, 20); park(); pip_r = 20; pip_c = 100;
    press(771, 668); park();
    run(M_PIP, 1);
    press(771, 668); press(515, 668); park();
    // bluescreen: calibrate on the live picture, then key
    press(60, 292); park();
    frames(3);
    press(55, 260); park();
    run(M_BS, 1);
    press(55, 260); park();
    // zoom 2x about row 100 / column 360, then switch to 3x
    press(60, 620); press(304 + 360, 100); park();
    press(55, 515); park();
    run(M_ZOOM2, 1);
    press(55, 568); park();
    run(M_ZOOM3, 1);
    press(55, 515); press(55, 548); park();
    // trace pixel at row 60, column 200
    press(780, 700); press(304 + 200, 60); park();
    press(515, 700); park();
    trace_on = 1; trace_expect = 1;
    run(M_OVL, 1);
    // clear the trace, and start a text render straight away: it must wait
    press(650, 700); park();
    press(780, 604); park();
    key("H"); key("I"); key(13);
    txt = {"HI", {46{8'd32}}};
    wait (text_busy); wait (!text_busy);
    trace_expect = 0;
    press(515, 604); press(650, 604); press(304 + 300, 100); park();
    txt_on = 1; txt_r = 100; txt_c = 300;
    @(negedge clk) mxy = {10'd200, 10'(304 + 500)};
    run(M_OVL, 1);
    chk(n_pass > 0, "mechanism: pass-through");
    chk(n_grab_writes > 0, "mechanism: frame grab");
    chk(n_fg > 1000, $sformatf("mechanism: full-screen still frame (%0d)", n_fg));
    chk(n_pip > 1000, $sformatf("mechanism: picture in picture (%0d)", n_pip));
    chk(n_bs_cal > 0, "mechanism: bluescreen calibration");
    chk(n_bs_repl > 100 && n_bs_keep > 100, $sformatf("mechanism: bluescreen keying (%0d replaced, %0d kept)", n_bs_repl, n_bs_keep));
    chk(n_zoom2 > 50000, $sformatf("mechanism: zoom 2x (%0d pairs)", n_zoom2));
    chk(n_zoom3 > 20000, $sformatf("mechanism: zoom 3x after mode switch (%0d triples)", n_zoom3));
    chk(n_trace >= 2, $sformatf("mechanism: trace pixel (%0d)", n_trace));
    chk(n_stall > 1000, $sformatf("mechanism: text render stalled on overlay ready (%0d)", n_stall));
    chk(n_text > 100, $sformatf("mechanism: text overlay (%0d)", n_text));
    chk(n_cleared >= 2, "mechanism: trace cleared");
    chk(n_cursor > 10, $sformatf("mechanism: cursor (%0d)", n_cursor));
    chk(n_vga_lit > 1000 && n_hsync > 100, $sformatf("mechanism: VGA GUI (%0d lit, %0d lines)", n_vga_lit, n_hsync));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (40 * FRAME) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
