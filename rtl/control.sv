// control -- the user interface and the control signals for the data path.
//
// What it does (following the document): draws a 1024x768 GUI on a VGA
// monitor -- check boxes, option buttons, pushbuttons, text labels, the
// typed-text line and a 720x525 drawing surface at (304,0) -- and turns
// mouse and keyboard input into the data path controls:
//  * enables (bluescreen, zoom, text1, text2, framegrab overlay, trace),
//    the PIP flag, framegrab address select (= bluescreen enable) and the
//    zoom magnification (option buttons 2x/3x/4x -> 0/1/2);
//  * framegrab trigger, bluescreen calibrate and trace clear, each a
//    pushbutton through a level-to-pulse converter;
//  * a drawing-surface state register set by the SET POSITION and DRAW
//    buttons. A press on the surface then stores the zoom centre, or writes
//    a text/framegrab position or a trace pixel to the overlay module using
//    the select codes and data format of the document's Table 1;
//  * the text render: ENTER TEXT picks a text buffer, typed keys go into
//    the 48-character keyboard buffer, the return key starts the font FSM,
//    which writes all 720x24 pixels of the chosen text buffer (one per
//    clock, taking priority over surface writes) and then clears the
//    keyboard buffer.
// The framegrab overlay enable is forced off while the bluescreen is on.
// Layout coordinates and label strings are the document's.
//
// Clocks: all state and the data path outputs run on clk (the 27 MHz video
// clock); the widgets' drawing, the labels and the VGA timing run on vclk
// (65 MHz). Widget state crosses through two-flop synchronisers inside
// gui_widget. The keyboard text shown on screen is read across the clock
// boundary without synchronisation: it only changes on a key press, and a
// wrong pixel for one frame is harmless.
// Font ROM: not part of this design (contents are not given); two read
// ports are brought out. vga_font_addr (vclk) is the OR of all label
// addresses, registered; the byte must come back one vclk later.
// tv_font_addr (clk) serves the overlay text renderer; its byte must come
// back one clk later.
// VGA output: the widget and label colours are ORed in two register stages
// (as in the document); hsync/vsync/blank are delayed to match.
//
// This design's own choices: mouse position is {y[19:10], x[9:0]}; the
// zoom centre resets to the middle of the picture (row 240, column 360);
// the return key with no ENTER TEXT selected does nothing; the positions of
// the DRAW, ENTER TEXT and CLEAR labels are assumed one pixel right and two
// down from their buttons, like the document's other button labels.
module control
  import vfx_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        vclk,
  input  logic        vrst,
  // mouse and keyboard
  input  logic [19:0] mouse_xy,
  input  logic        mouse_click,
  input  logic [7:0]  kb_ascii,
  input  logic        kb_ready,
  // VGA
  output logic        vga_hsync,
  output logic        vga_vsync,
  output logic        vga_blank,
  output logic [2:0]  vga_rgb,
  output logic [10:0] vga_font_addr,
  input  logic [7:0]  vga_font_byte,
  output logic [10:0] tv_font_addr,
  input  logic [7:0]  tv_font_byte,
  // data path controls
  output logic        bluescreen_en,
  output logic        bluescreen_cal,
  output logic        framegrab_trig,
  output logic        framegrab_addr_select,
  output logic        zoom_en,
  output logic [1:0]  zoom_mag,
  output logic [19:0] zoom_pos,
  output logic        trace_en,
  output logic        text1_en,
  output logic        text2_en,
  output logic        fg_overlay_en,
  output logic        pip_en,
  output logic [2:0]  ovl_select,
  output logic [20:0] ovl_data,
  output logic        ovl_we,
  output logic        ovl_clear,
  input  logic        ovl_ready,
  output logic [19:0] mouse_pos,
  output logic        text_busy
);
  // ---------------- widgets ----------------
  localparam int NW = 21;
  localparam int W_FGTRIG = 0, W_BSEN = 1, W_BSCAL = 2, W_ZOOMEN = 3, W_X2 = 4, W_X3 = 5,
                 W_X4 = 6, W_ZOOMPOS = 7, W_T1EN = 8, W_T2EN = 9, W_FGEN = 10, W_TREN = 11,
                 W_PIP = 12, W_T1POS = 13, W_T2POS = 14, W_FGPOS = 15, W_T1ENTER = 16,
                 W_T2ENTER = 17, W_TRCLR = 18, W_TRDRAW = 19, W_SURF = 20;
  localparam widget_kind_e WK [NW] = '{W_BUTTON, W_CHECKBOX, W_BUTTON, W_CHECKBOX, W_OPTION,
      W_OPTION, W_OPTION, W_BUTTON, W_CHECKBOX, W_CHECKBOX, W_CHECKBOX, W_CHECKBOX, W_CHECKBOX,
      W_BUTTON, W_BUTTON, W_BUTTON, W_BUTTON, W_BUTTON, W_BUTTON, W_BUTTON, W_BUTTON};
  localparam int WX [NW] = '{50, 50, 50, 50, 50, 50, 50, 50, 512, 512, 512, 512, 768,
                             640, 640, 640, 768, 768, 640, 768, 304};
  localparam int WY [NW] = '{128, 256, 288, 512, 544, 564, 584, 616, 600, 632, 664, 696, 664,
                             600, 632, 664, 600, 632, 696, 696, 0};
  localparam int SURF_X = 304, SURF_Y = 0, SURF_W = 720, SURF_H = 525;

  logic [9:0]  mx, my;
  logic [10:0] hcount;
  logic [9:0]  vcount;
  logic [NW-1:0] wval, wclick, wstat;
  logic [2:0]  wpix [NW];
  logic [1:0]  zoom_level;

  assign mx = mouse_xy[9:0];
  assign my = mouse_xy[19:10];
  always_comb begin
    wstat = '0;
    wstat[W_X2] = (zoom_level == 2'd0);
    wstat[W_X3] = (zoom_level == 2'd1);
    wstat[W_X4] = (zoom_level == 2'd2);
  end

  for (genvar i = 0; i < NW; i++) begin : g_widget
    localparam bit SURF = (i == W_SURF);
    gui_widget #(
      .KIND(WK[i]), .X(WX[i]), .Y(WY[i]),
      .WIDTH(SURF ? SURF_W : (WK[i] == W_BUTTON ? 100 : 16)),
      .HEIGHT(SURF ? SURF_H : 16),
      .COLOR(SURF ? 3'd1 : 3'd7), .FILLCOLOR(SURF ? 3'd1 : 3'd0), .INVERT_ON_CLICK(!SURF)
    ) u_w (
      .clk, .rst, .vclk, .mx, .my, .click(mouse_click), .status(wstat[i]),
      .hcount, .vcount, .value(wval[i]), .clicked(wclick[i]), .pixel(wpix[i])
    );
  end

  // ---------------- labels ----------------
  localparam int NL = 24;
  localparam logic [95:0] LS [NL] = '{"ENABLE", "ENABLE", "ENABLE", "ENABLE", "ENABLE", "ENABLE",
      "PIP", "FRAMEGRABBER", "BLUESCREEN", "ZOOM", "OVERLAY", "2x", "3x", "4x", "CALIBRATE",
      "TRIGGER", "SET POSITION", "SET POSITION", "SET POSITION", "SET POSITION", "DRAW",
      "ENTER TEXT", "ENTER TEXT", "CLEAR"};
  localparam int LN [NL] = '{6, 6, 6, 6, 6, 6, 3, 12, 10, 4, 7, 2, 2, 2, 9, 7, 12, 12, 12, 12,
                             4, 10, 10, 5};
  localparam int LX [NL] = '{74, 74, 536, 536, 536, 536, 792, 50, 50, 50, 640, 74, 74, 74, 52,
                             52, 51, 641, 641, 641, 769, 769, 769, 641};
  localparam int LY [NL] = '{258, 514, 602, 634, 666, 698, 666, 112, 240, 496, 568, 546, 566,
                             586, 290, 130, 618, 602, 634, 666, 698, 602, 634, 698};
  localparam int KB_X = 256, KB_Y = 730, KB_N = 48;

  logic [10:0] laddr [NL+1];
  logic [2:0]  lpix  [NL+1];
  logic [8*KB_N-1:0] kb_text;

  for (genvar i = 0; i < NL; i++) begin : g_label
    text_display #(.NCHAR(LN[i]), .X(LX[i]), .Y(LY[i])) u_t (
      .vclk, .hcount, .vcount, .text(LS[i][8*LN[i]-1:0]),
      .font_addr(laddr[i]), .font_byte(vga_font_byte), .pixel(lpix[i])
    );
  end
  text_display #(.NCHAR(KB_N), .X(KB_X), .Y(KB_Y)) u_kb_text (
    .vclk, .hcount, .vcount, .text(kb_text),
    .font_addr(laddr[NL]), .font_byte(vga_font_byte), .pixel(lpix[NL])
  );

  // ---------------- VGA timing and the OR pipeline ----------------
  logic hs0, vs0, bl0, hs1, vs1, bl1;
  logic [2:0] rgb_w, rgb_l;
  logic [10:0] addr_or;
  xvga u_xvga (.clk(vclk), .rst(vrst), .hcount, .vcount, .hsync(hs0), .vsync(vs0), .blank(bl0));

  always_comb begin
    addr_or = '0;
    rgb_l   = '0;
    for (int i = 0; i <= NL; i++) begin
      addr_or = addr_or | laddr[i];
      rgb_l   = rgb_l | lpix[i];
    end
    rgb_w = '0;
    for (int i = 0; i < NW; i++) rgb_w = rgb_w | wpix[i];
  end

  logic [2:0] rgb_w_q, rgb_l_q;
  always_ff @(posedge vclk) begin
    vga_font_addr <= addr_or;
    rgb_w_q <= rgb_w;
    rgb_l_q <= rgb_l;
    {hs1, vs1, bl1} <= {hs0, vs0, bl0};
    vga_rgb <= bl1 ? 3'd0 : (rgb_w_q | rgb_l_q);
    {vga_hsync, vga_vsync, vga_blank} <= {hs1, vs1, bl1};
  end

  // ---------------- data path controls ----------------
  assign bluescreen_en         = wval[W_BSEN];
  assign framegrab_addr_select = wval[W_BSEN];
  assign zoom_en               = wval[W_ZOOMEN];
  assign zoom_mag              = zoom_level;
  assign text1_en              = wval[W_T1EN];
  assign text2_en              = wval[W_T2EN];
  assign fg_overlay_en         = wval[W_FGEN] & ~wval[W_BSEN];
  assign trace_en              = wval[W_TREN];
  assign pip_en                = wval[W_PIP];

  level_to_pulse u_l2p_fg  (.clk, .rst, .level(wval[W_FGTRIG]), .pulse(framegrab_trig));
  level_to_pulse u_l2p_cal (.clk, .rst, .level(wval[W_BSCAL]),  .pulse(bluescreen_cal));
  level_to_pulse u_l2p_clr (.clk, .rst, .level(wval[W_TRCLR]),  .pulse(ovl_clear));

  // mouse position on the drawing surface = TV position
  logic [9:0] surf_x, surf_y;
  assign surf_x = (int'(mx) < SURF_X || int'(mx) > SURF_X + SURF_W) ? 10'd0 : 10'(int'(mx) - SURF_X);
  assign surf_y = (int'(my) < SURF_Y || int'(my) > SURF_Y + SURF_H) ? 10'd0 : 10'(int'(my) - SURF_Y);
  assign mouse_pos = {surf_y, surf_x};

  typedef enum logic [2:0] {SURF_OFF, SURF_ZOOM, SURF_TRACE, SURF_TEXT1, SURF_TEXT2, SURF_FG} surf_e;
  surf_e surf_state;
  logic  text_active, text_buf;
  logic  load_start, load_busy, load_done, load_idle, kb_enter;
  assign text_busy = ~load_idle;
  logic [4:0] load_row, r_row;
  logic [9:0] load_col, r_col;
  logic       r_valid, r_pixel;

  always_ff @(posedge clk)
    if (rst) begin
      zoom_level  <= 2'd0;
      surf_state  <= SURF_OFF;
      zoom_pos    <= {10'd240, 10'd360};
      text_active <= 1'b0;
      text_buf    <= 1'b0;
    end else begin
      if (wclick[W_X2]) zoom_level <= 2'd0;
      if (wclick[W_X3]) zoom_level <= 2'd1;
      if (wclick[W_X4]) zoom_level <= 2'd2;
      if (wval[W_ZOOMPOS]) surf_state <= SURF_ZOOM;
      if (wval[W_TRDRAW])  surf_state <= SURF_TRACE;
      if (wval[W_T1POS])   surf_state <= SURF_TEXT1;
      if (wval[W_T2POS])   surf_state <= SURF_TEXT2;
      if (wval[W_FGPOS])   surf_state <= SURF_FG;
      if (wval[W_SURF] && surf_state == SURF_ZOOM) zoom_pos <= mouse_pos;
      if (load_done) text_active <= 1'b0;
      if (wval[W_T1ENTER]) begin text_active <= 1'b1; text_buf <= 1'b0; end
      if (wval[W_T2ENTER]) begin text_active <= 1'b1; text_buf <= 1'b1; end
    end

  keyboard_buffer #(.DEPTH(KB_N)) u_kb (
    .clk, .rst, .ascii(kb_ascii), .key_ready(kb_ready), .clear(load_done),
    .text(kb_text), .enter(kb_enter)
  );
  assign load_start = kb_enter & text_active;
  font_load_fsm u_fsm (
    .clk, .rst, .start(load_start), .ready(ovl_ready),
    .row(load_row), .col(load_col), .busy(load_busy), .done(load_done), .idle(load_idle)
  );
  overlay_font_render #(.NCHAR(KB_N)) u_render (
    .clk, .row(load_row), .col(load_col), .valid(load_busy), .text(kb_text),
    .font_addr(tv_font_addr), .font_byte(tv_font_byte),
    .row_out(r_row), .col_out(r_col), .valid_out(r_valid), .pixel(r_pixel)
  );

  // overlay bus (Table 1), registered
  always_ff @(posedge clk)
    if (rst) begin
      ovl_we     <= 1'b0;
      ovl_select <= '0;
      ovl_data   <= '0;
    end else begin
      ovl_we <= 1'b0;
      if (r_valid) begin
        ovl_select <= text_buf ? SEL_TEXT2_BUF : SEL_TEXT1_BUF;
        ovl_data   <= {r_pixel, 5'd0, r_row, r_col};
        ovl_we     <= 1'b1;
      end else if (wval[W_SURF] && ovl_ready) begin
        ovl_data <= {1'b0, mouse_pos};
        unique case (surf_state)
          SURF_TRACE: begin ovl_select <= SEL_TRACE_BUF; ovl_data[20] <= 1'b1; ovl_we <= 1'b1; end
          SURF_TEXT1: begin ovl_select <= SEL_TEXT1_POS; ovl_we <= 1'b1; end
          SURF_TEXT2: begin ovl_select <= SEL_TEXT2_POS; ovl_we <= 1'b1; end
          SURF_FG:    begin ovl_select <= SEL_FG_POS;    ovl_we <= 1'b1; end
          default: ;
        endcase
      end
    end
endmodule
