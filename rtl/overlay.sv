// overlay -- draws the overlay objects on top of the video: a mouse cursor,
// a freehand trace, two lines of text and the grabbed still frame (full
// screen or as a quarter-size picture-in-picture).
//
// Memories (one bit per pixel, 1 = paint white):
//   trace buffer  240 x 720 = 172800 bits, indexed by field line, so both
//                 fields show the same trace and it does not flicker;
//   text1, text2  24 x 720 = 17280 bits each, indexed by the frame row and
//                 column relative to the text's top-left position.
// All are simple dual-port: the select logic writes, the rendering logic
// reads. The select logic decodes the control bus (select, data, we):
//   000/010 write text1/text2 bit data[20] at row data[19:10], col data[9:0]
//   001/011 set text1/text2 position, 100 set the picture-in-picture
//   position (all {row, col} in data[19:0]), 110 write trace bit data[20] at
//   frame row data[19:10] (its LSB dropped), col data[9:0]; 101/111 ignored.
// A clear pulse (and reset) drops `ready` and writes zeros to all 172800
// trace locations, one per clock; bus writes are ignored until `ready`
// returns.
// Rendering priority: cursor (a 9-pixel cross at mouse_pos), trace, text1,
// text2, grabbed frame, live video. Full screen shows stored pixel (row, x);
// picture-in-picture shows a 240-row x 360-pixel window at the programmed
// position filled with every second pixel of every second stored row.
//
// Timing: the buffer read addresses are formed one sample ahead (the BRAM
// read takes a clock) and the framegrab address FG_READ_LATENCY samples
// ahead, both across line ends, so all data lines up with the live pixel.
// Pixel and fvh out are registered: latency 1 clock. Positions are
// {frame_row[9:0], column[9:0]}, frame row = 2 * field line + field.
// The memories, their sizes and addressing, the bus codes, the clear/ready
// behaviour and the priority follow the document. Exact look-ahead (the
// document's version is one pixel late and crops the PIP edges instead), the
// white value and the cursor shape details are this design's choices.
// Lint: the top bit of the PIP-relative row and column is unused because the
// window is at most 240 x 360; a negative offset is caught by the range test.
module overlay
  import vfx_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  pixel_t      ycrcb_in,
  input  fvh_t        fvh_in,
  input  logic        trace_enable,
  input  logic        text1_enable,
  input  logic        text2_enable,
  input  logic        framegrab_enable,
  input  logic        full_screen_enable,
  input  logic [2:0]  select,
  input  logic [20:0] data_bus,
  input  logic        write_enable,
  input  logic        clear,
  output logic        ready,
  input  logic [19:0] mouse_pos,
  output logic [19:0] fg_addr,
  input  pixel_t      fg_data,
  output pixel_t      ycrcb_out,
  output fvh_t        fvh_out
);
  localparam int unsigned TRACE_BITS = FIELD_LINES * LINE_PIXELS;   // 172800
  localparam int unsigned TEXT_ROWS  = 24;
  localparam int unsigned TEXT_BITS  = TEXT_ROWS * LINE_PIXELS;     // 17280
  localparam int unsigned PIP_ROWS   = FRAME_ROWS / 2;
  localparam int unsigned PIP_COLS   = LINE_PIXELS / 2;

  logic [10:0] samp;
  logic [9:0]  line, xpix;
  logic        field, active, h_rise, f_l2h, f_h2l;
  video_position pos (.clk, .rst, .fvh_in, .samp, .line, .field, .active, .xpix,
                      .h_rise, .field_l2h(f_l2h), .field_h2l(f_h2l));

  logic [9:0] row;                     // frame row of the current sample
  assign row = {line[8:0], field};

  // ---------------- select logic ----------------
  logic        trace_mem [TRACE_BITS];
  logic        text1_mem [TEXT_BITS];
  logic        text2_mem [TEXT_BITS];
  logic [19:0] text1_pos, text2_pos, pip_pos;
  logic [17:0] clr_count;

  logic [17:0] trace_waddr;
  logic [14:0] text_waddr;
  logic        trace_wen, text1_wen, text2_wen, trace_wbit;
  ovl_sel_e    sel;
  assign sel = ovl_sel_e'(select);

  always_comb begin
    trace_waddr = 18'(data_bus[19:11]) * 18'(LINE_PIXELS) + 18'(data_bus[9:0]);
    text_waddr  = 15'(data_bus[19:10]) * 15'(LINE_PIXELS) + 15'(data_bus[9:0]);
    trace_wbit  = data_bus[20];
    trace_wen   = 1'b0;
    text1_wen   = 1'b0;
    text2_wen   = 1'b0;
    if (!ready) begin
      trace_waddr = clr_count;
      trace_wbit  = 1'b0;
      trace_wen   = 1'b1;
    end else if (write_enable) begin
      trace_wen = (sel == SEL_TRACE_BUF) && (data_bus[19:11] < 9'(FIELD_LINES)) &&
                  (data_bus[9:0] < 10'(LINE_PIXELS));
      text1_wen = (sel == SEL_TEXT1_BUF) && (data_bus[19:10] < 10'(TEXT_ROWS)) &&
                  (data_bus[9:0] < 10'(LINE_PIXELS));
      text2_wen = (sel == SEL_TEXT2_BUF) && (data_bus[19:10] < 10'(TEXT_ROWS)) &&
                  (data_bus[9:0] < 10'(LINE_PIXELS));
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      ready     <= 1'b0;
      clr_count <= '0;
      text1_pos <= '0;
      text2_pos <= '0;
      pip_pos   <= '0;
    end else if (clear) begin
      ready     <= 1'b0;
      clr_count <= '0;
    end else if (!ready) begin
      if (clr_count == 18'(TRACE_BITS - 1)) begin
        ready     <= 1'b1;
        clr_count <= '0;
      end else clr_count <= clr_count + 18'd1;
    end else if (write_enable) begin
      unique case (sel)
        SEL_TEXT1_POS: text1_pos <= data_bus[19:0];
        SEL_TEXT2_POS: text2_pos <= data_bus[19:0];
        SEL_FG_POS:    pip_pos   <= data_bus[19:0];
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk) if (trace_wen) trace_mem[trace_waddr] <= trace_wbit;
  always_ff @(posedge clk) if (text1_wen) text1_mem[text_waddr] <= data_bus[20];
  always_ff @(posedge clk) if (text2_wen) text2_mem[text_waddr] <= data_bus[20];

  // ---------------- rendering: read addresses ----------------
  // position of the sample n ahead, wrapping into the next line
  function automatic logic [9:0] ahead_x(input logic [10:0] s, input int unsigned n);
    logic [11:0] a;
    a = 12'(s) + 12'(n);
    if (a >= 12'(SAMPLES_PER_LINE)) a = a - 12'(SAMPLES_PER_LINE);
    return (a < 12'(ACTIVE_SAMPLES)) ? a[10:1] : 10'd0;
  endfunction

  logic [9:0]  x1, x3;
  logic [9:0]  t1_r, t1_c, t2_r, t2_c;
  logic        t1_in_n, t2_in_n;
  logic [17:0] trace_raddr;
  logic [14:0] t1_raddr, t2_raddr;
  always_comb begin
    x1 = ahead_x(samp, 1);
    x3 = ahead_x(samp, FG_READ_LATENCY);
    trace_raddr = 18'(line) * 18'(LINE_PIXELS) + 18'(x1);
    t1_r = row - text1_pos[19:10];
    t1_c = x1 - text1_pos[9:0];
    t2_r = row - text2_pos[19:10];
    t2_c = x1 - text2_pos[9:0];
    t1_in_n = (row >= text1_pos[19:10]) && (t1_r < 10'(TEXT_ROWS)) && (x1 >= text1_pos[9:0]);
    t2_in_n = (row >= text2_pos[19:10]) && (t2_r < 10'(TEXT_ROWS)) && (x1 >= text2_pos[9:0]);
    t1_raddr = t1_in_n ? 15'(t1_r) * 15'(LINE_PIXELS) + 15'(t1_c) : '0;
    t2_raddr = t2_in_n ? 15'(t2_r) * 15'(LINE_PIXELS) + 15'(t2_c) : '0;
  end

  logic trace_q, text1_q, text2_q, t1_in, t2_in;
  always_ff @(posedge clk) begin
    trace_q <= (line < 10'(FIELD_LINES)) ? trace_mem[trace_raddr] : 1'b0;
    text1_q <= text1_mem[t1_raddr];
    text2_q <= text2_mem[t2_raddr];
  end
  always_ff @(posedge clk) begin
    if (rst) begin t1_in <= 1'b0; t2_in <= 1'b0; end
    else begin t1_in <= t1_in_n; t2_in <= t2_in_n; end
  end

  // framegrab address, FG_READ_LATENCY samples ahead
  logic [9:0] pr_rel, pc_rel, pr_rel3, pc_rel3;
  logic       pip_here;
  always_comb begin
    pr_rel  = row - pip_pos[19:10];
    pc_rel  = xpix - pip_pos[9:0];
    pr_rel3 = row - pip_pos[19:10];
    pc_rel3 = x3 - pip_pos[9:0];
    pip_here = (row >= pip_pos[19:10]) && (pr_rel < 10'(PIP_ROWS)) &&
               (xpix >= pip_pos[9:0]) && (pc_rel < 10'(PIP_COLS));
    if (full_screen_enable) fg_addr = {row, x3};
    else                    fg_addr = {pr_rel3[8:0], 1'b0, pc_rel3[8:0], 1'b0};
  end

  // ---------------- rendering: pixel choice ----------------
  logic   cursor;
  pixel_t ovl;
  always_comb begin
    cursor = ((row == mouse_pos[19:10]) && (xpix + 10'd4 >= mouse_pos[9:0]) &&
              (xpix <= mouse_pos[9:0] + 10'd4)) ||
             ((xpix == mouse_pos[9:0]) && (row + 10'd4 >= mouse_pos[19:10]) &&
              (row <= mouse_pos[19:10] + 10'd4));
    if (!active)                               ovl = ycrcb_in;
    else if (cursor)                           ovl = WHITE;
    else if (trace_enable && trace_q)          ovl = WHITE;
    else if (text1_enable && t1_in && text1_q) ovl = WHITE;
    else if (text2_enable && t2_in && text2_q) ovl = WHITE;
    else if (framegrab_enable && (full_screen_enable || pip_here)) ovl = fg_data;
    else                                       ovl = ycrcb_in;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      ycrcb_out <= '0;
      fvh_out   <= '{f: 1'b0, v: 1'b1, h: 1'b1};
    end else begin
      ycrcb_out <= ovl;
      fvh_out   <= fvh_in;
    end
  end
endmodule
