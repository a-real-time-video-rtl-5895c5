// vfx_top -- the real-time video effects processor.
//
// Data path (one 27 MHz video clock, clk_tv):
//   tv_in (CCIR656 10-bit samples) -> ccir656_decoder -> bluescreen -> zoom
//   -> overlay -> video_encoder -> tv_out (CCIR656).
// framegrab watches the decoder output and stores one frame in ZBT bank 0
// on a trigger; its read port is shared by the overlay (still frame, full
// screen or picture-in-picture) and the bluescreen (replacement background).
// Which one owns the port is framegrab_addr_select = bluescreen enable, and
// the framegrab overlay is forced off while the bluescreen is on, as in the
// document. zoom double-buffers one field in ZBT bank 1.
// control draws the GUI on a 1024x768 VGA monitor (clk_vga, 65 MHz) and
// drives all data path controls from mouse and keyboard.
//
// Parts outside this design, brought out as ports: the two ZBT SRAM banks
// (ram0_*, ram1_*: 19-bit word address, 36-bit data, two-clock read
// latency, clocked by clk_tv), the font ROM (two read ports, one per
// clock, one-clock latency), the PS/2 mouse and keyboard (mouse_xy =
// {y, x} on the 1024x768 screen, mouse_click level, kb_ascii with a
// kb_ready strobe, all synchronous to clk_tv), the VGA DAC (3-bit RGB and
// syncs on clk_vga), the video decoder/encoder chips and their set-up, and
// the clock generator for clk_vga.
//
// Latency tv_in -> tv_out: the decoder, the three effect stages and the
// encoder each add fixed delays (see each block); the output is a clean
// CCIR656 stream that follows the input line and field timing.
// Status outputs (for LEDs): fg_state, bs_calibrating, overlay_ready (low
// while the trace buffer is being cleared) and text_busy (text render
// pending or running).
// Reset: rst is synchronous to clk_tv; it is re-synchronised for clk_vga.
// Lint: ram0_wdata[35:30] and ram1_wdata[35:30] are tied to 0: each pixel
// uses 30 of the 36 bits of a ZBT word.
module vfx_top
  import vfx_pkg::*;
(
  input  logic        clk_tv,
  input  logic        clk_vga,
  input  logic        rst,
  input  logic [9:0]  tv_in,
  output logic [9:0]  tv_out,
  input  logic [19:0] mouse_xy,
  input  logic        mouse_click,
  input  logic [7:0]  kb_ascii,
  input  logic        kb_ready,
  output logic        vga_hsync,
  output logic        vga_vsync,
  output logic        vga_blank,
  output logic [2:0]  vga_rgb,
  output logic [10:0] vga_font_addr,
  input  logic [7:0]  vga_font_byte,
  output logic [10:0] tv_font_addr,
  input  logic [7:0]  tv_font_byte,
  output logic [18:0] ram0_addr,
  output logic        ram0_we,
  output logic [35:0] ram0_wdata,
  input  logic [35:0] ram0_rdata,
  output logic [18:0] ram1_addr,
  output logic        ram1_we,
  output logic [35:0] ram1_wdata,
  input  logic [35:0] ram1_rdata,
  output logic [1:0]  fg_state,
  output logic        bs_calibrating,
  output logic        overlay_ready,
  output logic        text_busy
);
  // reset for the VGA clock domain
  logic vrst_s1, vrst;
  always_ff @(posedge clk_vga) begin
    vrst_s1 <= rst;
    vrst    <= vrst_s1;
  end

  pixel_t dec_pix, bs_pix, zm_pix, ov_pix;
  fvh_t   dec_fvh, bs_fvh, zm_fvh, ov_fvh;
  logic [19:0] bs_fg_addr, ov_fg_addr, zoom_pos, mouse_pos;
  logic [29:0] fg_read;
  logic bs_en, bs_cal, fg_trig, fg_sel, zoom_en, trace_en, text1_en, text2_en, fg_ov_en, pip_en;
  logic [1:0] zoom_mag;
  logic [2:0] ovl_select;
  logic [20:0] ovl_data;
  logic ovl_we, ovl_clear, ovl_ready;

  ccir656_decoder u_dec (.clk(clk_tv), .rst, .din(tv_in), .ycrcb_out(dec_pix), .fvh_out(dec_fvh));

  framegrab u_fg (
    .clk(clk_tv), .rst, .ycrcb_in(dec_pix), .fvh_in(dec_fvh), .trigger(fg_trig),
    .addr_select(fg_sel), .o_addr(ov_fg_addr), .b_addr(bs_fg_addr), .read_data(fg_read),
    .ram_addr(ram0_addr), .ram_we(ram0_we), .ram_wdata(ram0_wdata), .ram_rdata(ram0_rdata),
    .state_out(fg_state)
  );

  bluescreen u_bs (
    .clk(clk_tv), .rst, .enable(bs_en), .cal_start(bs_cal), .ycrcb_in(dec_pix), .fvh_in(dec_fvh),
    .ycrcb_out(bs_pix), .fvh_out(bs_fvh), .fg_addr(bs_fg_addr), .fg_data(pixel_t'(fg_read)),
    .calibrating(bs_calibrating)
  );

  zoom u_zoom (
    .clk(clk_tv), .rst, .ycrcb_in(bs_pix), .fvh_in(bs_fvh), .zoom_enable(zoom_en),
    .zoom_pos, .zoom_mag, .ycrcb_out(zm_pix), .fvh_out(zm_fvh),
    .ram_addr(ram1_addr), .ram_we(ram1_we), .ram_wdata(ram1_wdata), .ram_rdata(ram1_rdata)
  );

  overlay u_ovl (
    .clk(clk_tv), .rst, .ycrcb_in(zm_pix), .fvh_in(zm_fvh), .trace_enable(trace_en),
    .text1_enable(text1_en), .text2_enable(text2_en), .framegrab_enable(fg_ov_en),
    .full_screen_enable(~pip_en), .select(ovl_select), .data_bus(ovl_data),
    .write_enable(ovl_we), .clear(ovl_clear), .ready(ovl_ready), .mouse_pos,
    .fg_addr(ov_fg_addr), .fg_data(pixel_t'(fg_read)), .ycrcb_out(ov_pix), .fvh_out(ov_fvh)
  );

  video_encoder u_enc (.clk(clk_tv), .rst, .ycrcb_in(ov_pix), .fvh_in(ov_fvh), .tv_out);

  control u_ctl (
    .clk(clk_tv), .rst, .vclk(clk_vga), .vrst, .mouse_xy, .mouse_click, .kb_ascii, .kb_ready,
    .vga_hsync, .vga_vsync, .vga_blank, .vga_rgb, .vga_font_addr, .vga_font_byte,
    .tv_font_addr, .tv_font_byte,
    .bluescreen_en(bs_en), .bluescreen_cal(bs_cal), .framegrab_trig(fg_trig),
    .framegrab_addr_select(fg_sel), .zoom_en, .zoom_mag, .zoom_pos, .trace_en, .text1_en,
    .text2_en, .fg_overlay_en(fg_ov_en), .pip_en, .ovl_select, .ovl_data, .ovl_we, .ovl_clear,
    .ovl_ready, .mouse_pos, .text_busy
  );
  assign overlay_ready = ovl_ready;
endmodule
