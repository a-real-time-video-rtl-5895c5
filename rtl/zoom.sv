// zoom -- digital zoom by 2x, 3x or 4x around a selectable centre, using an
// external ZBT SRAM as a double-buffered field store and a sample/hold
// interpolation filter (each stored pixel is repeated M times in both
// directions).
//
// For magnification M the block stores, from every incoming field, the
// window of (720/M) pixels x (240/M) field lines centred on zoom_pos into the
// current write half of the SRAM, at (line - top) * (720/M) + (x - left). The
// centre is clamped so that the window stays inside the frame, and is only
// taken over at a falling edge of the field flag. Every field edge swaps the
// write half and the read half, so the output is built from the previous
// field. An output pixel at field line l, column x reads the stored pixel
// (l / M, x / M); division by 2 and 4 is a shift and division by 3 uses two
// lookup ROMs (one for the column, one for the line).
// A new pixel arrives only every second clock, so the single SRAM port is
// shared by interleaving: the first sample of each pixel is a write slot, the
// second a read slot. A read is issued three samples ahead (also across the
// end of a line) so that its data returns on the first sample of the pixel it
// belongs to; the value is then held for the pixel's second sample.
//
// Timing: pixel and fvh out are registered, latency 1 clock. zoom_pos is
// {frame_row[9:0], column[9:0]}; zoom_mag 0/1/2 = 2x/3x/4x, 3 = no zoom.
// The double buffer, the field-edge swap, the 2/4 shifts and the divide-by-3
// tables, the read/write interleaving and the clamped centre follow the
// document. Storing a half-buffer at SRAM word 0 or 65536, writing only inside
// the window and issuing reads ahead of time are this design's choices. The
// bilinear filter the document also describes is not part of this block.
// Lint: zoom_pos[10] (row bit above 479) and ram_rdata[35:30] (the six
// unused bits of each ZBT word) are not used.
module zoom
  import vfx_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  pixel_t      ycrcb_in,
  input  fvh_t        fvh_in,
  input  logic        zoom_enable,
  input  logic [19:0] zoom_pos,
  input  logic [1:0]  zoom_mag,
  output pixel_t      ycrcb_out,
  output fvh_t        fvh_out,
  output logic [18:0] ram_addr,
  output logic        ram_we,
  output logic [35:0] ram_wdata,
  input  logic [35:0] ram_rdata
);
  localparam int unsigned HALF = 65536;   // SRAM words per buffer half

  logic [10:0] samp;
  logic [9:0]  line, xpix;
  logic        field, active, h_rise, f_l2h, f_h2l;
  video_position pos (.clk, .rst, .fvh_in, .samp, .line, .field, .active, .xpix,
                      .h_rise, .field_l2h(f_l2h), .field_h2l(f_h2l));

  // ---- window geometry for the selected magnification ----
  logic [9:0] win_w, win_h;          // pixels, field lines
  always_comb begin
    unique case (zoom_mag)
      2'd0:    begin win_w = 10'd360; win_h = 10'd120; end
      2'd1:    begin win_w = 10'd240; win_h = 10'd80;  end
      default: begin win_w = 10'd180; win_h = 10'd60;  end
    endcase
  end

  // ---- clamped centre, updated on a falling field edge ----
  logic [9:0] cx, cl, left, top;
  logic [9:0] req_x, req_l;
  assign req_x = zoom_pos[9:0];
  assign req_l = {1'b0, zoom_pos[19:11]};   // frame row -> field line
  always_ff @(posedge clk) begin
    if (rst) begin
      cx <= 10'd360; cl <= 10'd120;
    end else if (f_h2l) begin
      if (req_x < (win_w >> 1))                      cx <= win_w >> 1;
      else if (req_x > 10'(LINE_PIXELS) - (win_w >> 1)) cx <= 10'(LINE_PIXELS) - (win_w >> 1);
      else                                           cx <= req_x;
      if (req_l < (win_h >> 1))                      cl <= win_h >> 1;
      else if (req_l > 10'(FIELD_LINES) - (win_h >> 1)) cl <= 10'(FIELD_LINES) - (win_h >> 1);
      else                                           cl <= req_l;
    end
  end
  assign left = cx - (win_w >> 1);
  assign top  = cl - (win_h >> 1);

  // ---- buffer halves, swapped on every field edge ----
  logic wbuf;
  always_ff @(posedge clk) begin
    if (rst) wbuf <= 1'b0;
    else if (f_l2h || f_h2l) wbuf <= ~wbuf;
  end

  // ---- write slot ----
  logic        in_win, wr_now;
  logic [18:0] wr_addr;
  assign in_win  = active && (xpix >= left) && (xpix < left + win_w) &&
                   (line >= top) && (line < top + win_h);
  assign wr_now  = in_win && !samp[0] && (zoom_mag != 2'd3);
  assign wr_addr = 19'(wbuf ? HALF : 0) + 19'(line - top) * 19'(win_w) + 19'(xpix - left);

  // ---- read slot: address for the sample three ahead ----
  logic [11:0] ahead;
  logic [9:0]  ax;
  logic [8:0]  ax3, al3;
  logic [9:0]  src_x, src_l;
  logic [18:0] rd_addr;
  always_comb begin
    ahead = 12'(samp) + 12'(FG_READ_LATENCY);
    if (ahead >= 12'(SAMPLES_PER_LINE)) ahead = ahead - 12'(SAMPLES_PER_LINE);
    ax = (ahead < 12'(ACTIVE_SAMPLES)) ? ahead[10:1] : 10'd0;
  end
  div3_rom div_x (.a(ax),   .q(ax3));
  div3_rom div_l (.a(line), .q(al3));
  always_comb begin
    unique case (zoom_mag)
      2'd0:    begin src_x = ax >> 1;        src_l = line >> 1; end
      2'd1:    begin src_x = {1'b0, ax3};    src_l = {1'b0, al3}; end
      default: begin src_x = ax >> 2;        src_l = line >> 2; end
    endcase
    if (src_l > win_h - 10'd1) src_l = win_h - 10'd1;
    rd_addr = 19'(wbuf ? 0 : HALF) + 19'(src_l) * 19'(win_w) + 19'(src_x);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      ram_we <= 1'b0; ram_addr <= '0; ram_wdata <= '0;
    end else begin
      ram_we    <= wr_now;
      ram_addr  <= samp[0] ? rd_addr : wr_addr;
      ram_wdata <= {6'b0, ycrcb_in};
    end
  end

  // ---- sample/hold output ----
  pixel_t hold, zval;
  assign zval = samp[0] ? hold : pixel_t'(ram_rdata[29:0]);
  always_ff @(posedge clk) begin
    if (rst) begin
      hold      <= '0;
      ycrcb_out <= '0;
      fvh_out   <= '{f: 1'b0, v: 1'b1, h: 1'b1};
    end else begin
      hold      <= zval;
      ycrcb_out <= (zoom_enable && active && zoom_mag != 2'd3) ? zval : ycrcb_in;
      fvh_out   <= fvh_in;
    end
  end
endmodule
