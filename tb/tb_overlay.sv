// tb_overlay -- programs the overlay through the control bus (text and PIP
// positions, text bits, trace bits), then checks every active output pixel
// against a reference built from its own copy of the written bits for four
// settings: nothing enabled (cursor only), trace + both texts, full-screen
// still frame, picture-in-picture. Also checks that ready is low while the
// trace buffer is cleared (172800 clocks) and that the trace is gone after a
// clear, and that writes are ignored while not ready.
module tb_overlay;
  import vfx_pkg::*;
  import tb_vid_pkg::*;
  localparam int AL = 8, BL = 2, LL = (AL + BL) * 1716;
  logic clk = 0, rst = 1;
  pixel_t pix, out, fgd; fvh_t fvh, fvh_o; int cur_line, frames;
  logic tr_en = 0, t1_en = 0, t2_en = 0, fg_en = 0, full = 1;
  logic [2:0] sel = 0; logic [20:0] dbus = 0; logic we = 0, clr = 0, ready;
  logic [19:0] mpos = {10'd12, 10'd600}, fga, a1, a2;
  int checks = 0, failures = 0;
  int n_cursor, n_trace, n_t1, n_t2, n_fg, n_pip, n_live;
  always #5 clk = ~clk;
  video_source #(.ACTIVE_LINES(AL), .BLANK_LINES(BL)) src (.clk, .rst, .solid(1'b0), .solid_pix('0),
    .solid_x0(0), .solid_x1(0), .solid_l0(0), .solid_l1(0), .pix, .fvh, .cur_line, .frames);
  overlay dut (.clk, .rst, .ycrcb_in(pix), .fvh_in(fvh), .trace_enable(tr_en), .text1_enable(t1_en),
    .text2_enable(t2_en), .framegrab_enable(fg_en), .full_screen_enable(full), .select(sel),
    .data_bus(dbus), .write_enable(we), .clear(clr), .ready, .mouse_pos(mpos), .fg_addr(fga),
    .fg_data(fgd), .ycrcb_out(out), .fvh_out(fvh_o));
  function automatic pixel_t fgfun(input logic [19:0] a);
    return '{y: a[19:10], cr: a[9:0], cb: 10'h2AA};
  endfunction
  always_ff @(posedge clk) begin a1 <= fga; a2 <= a1; fgd <= fgfun(a2); end

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; if (failures < 12) $display("FAIL %s at %0t", what, $time); end
  endtask

  // reference copies
  bit tr [240][720]; bit t1 [24][720]; bit t2 [24][720];
  localparam int T1R = 2, T1C = 100, T2R = 5, T2C = 300, PR = 4, PC = 200;

  task automatic bus(input logic [2:0] s, input logic [20:0] d);
    @(negedge clk); sel = s; dbus = d; we = 1;
    @(negedge clk); we = 0;
  endtask

  pixel_t pin_q; fvh_t fvh_q; int line_q, s_q; int s_ref = 0; logic h_prev = 1; logic checking = 0;
  always @(posedge clk) if (!rst) begin
    int s_now;
    s_now = (h_prev && !fvh.h) ? 0 : s_ref;
    h_prev <= fvh.h; s_ref <= s_now + 1;
    if (checking && fvh_q.h == 0 && fvh_q.v == 0 && s_q < 1440) begin
      int r, x; pixel_t e;
      r = 2 * line_q + fvh_q.f; x = s_q / 2;
      if ((r == 12 && x >= 596 && x <= 604) || (x == 600 && r >= 8 && r <= 16)) begin e = WHITE; n_cursor++; end
      else if (tr_en && tr[r / 2][x]) begin e = WHITE; n_trace++; end
      else if (t1_en && r >= T1R && r - T1R < 24 && x >= T1C && t1[r - T1R][x - T1C]) begin e = WHITE; n_t1++; end
      else if (t2_en && r >= T2R && r - T2R < 24 && x >= T2C && t2[r - T2R][x - T2C]) begin e = WHITE; n_t2++; end
      else if (fg_en && full) begin e = fgfun({10'(r), 10'(x)}); n_fg++; end
      else if (fg_en && r >= PR && r - PR < 240 && x >= PC && x - PC < 360) begin
        e = fgfun({10'(2 * (r - PR)), 10'(2 * (x - PC))}); n_pip++; end
      else begin e = pin_q; n_live++; end
      chk(out == e, $sformatf("row %0d x %0d got %h exp %h", r, x, out, e));
    end
    pin_q <= pix; fvh_q <= fvh; line_q <= cur_line; s_q <= s_now;
  end

  int clr_cycles;
  initial begin
    repeat (3) @(posedge clk); rst = 0;
    @(posedge clk);
    chk(!ready, "not ready while clearing after reset");
    bus(SEL_TEXT1_POS, {1'b0, 10'd50, 10'd50});         // ignored: not ready
    while (!ready) begin @(posedge clk); clr_cycles++; end
    chk(clr_cycles > 172700 && clr_cycles < 172810, $sformatf("clear takes 172800 clocks (%0d)", clr_cycles));
    bus(SEL_TEXT1_POS, {1'b0, 10'(T1R), 10'(T1C)});
    bus(SEL_TEXT2_POS, {1'b0, 10'(T2R), 10'(T2C)});
    bus(SEL_FG_POS,    {1'b0, 10'(PR), 10'(PC)});
    for (int r = 0; r < 14; r++)
      for (int c = 0; c < 40; c++) begin
        if ((r + c) % 5 == 0) begin bus(SEL_TEXT1_BUF, {1'b1, 10'(r), 10'(c)}); t1[r][c] = 1; end
        if (c % 3 == 0 && r < 10) begin bus(SEL_TEXT2_BUF, {1'b1, 10'(r), 10'(c)}); t2[r][c] = 1; end
      end
    for (int c = 500; c < 510; c++) begin bus(SEL_TRACE_BUF, {1'b1, 10'd6, 10'(c)}); tr[3][c] = 1; end
    bus(SEL_TRACE_BUF, {1'b1, 10'd9, 10'd50}); tr[4][50] = 1;
    bus(3'b101, {1'b1, 10'd9, 10'd51});                  // ignored code
    @(negedge clk) checking = 1;
    repeat (2 * LL) @(posedge clk);
    tr_en = 1; t1_en = 1; t2_en = 1;
    repeat (2 * LL) @(posedge clk);
    fg_en = 1; full = 1;
    repeat (2 * LL) @(posedge clk);
    full = 0;
    repeat (2 * LL) @(posedge clk);
    fg_en = 0;
    @(negedge clk) checking = 0;
    @(negedge clk) clr = 1; @(negedge clk) clr = 0;
    chk(!ready, "ready drops on clear");
    wait (ready);
    tr = '{default: '{default: 0}};
    @(negedge clk) checking = 1;
    repeat (2 * LL) @(posedge clk);
    chk(n_cursor > 0 && n_trace > 0 && n_t1 > 0 && n_t2 > 0 && n_fg > 0 && n_pip > 0 && n_live > 0,
        $sformatf("all objects seen c%0d tr%0d t1%0d t2%0d fg%0d pip%0d", n_cursor, n_trace, n_t1, n_t2, n_fg, n_pip));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (60 * LL) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
