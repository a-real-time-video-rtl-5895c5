// bluescreen -- chroma keyer: replaces pixels whose colour lies inside a
// calibrated range by the stored still image from the framegrab block.
//
// Calibration: a pulse on cal_start arms a small FSM (WAIT_CAL -> WAIT_SYNC
// -> CALIBRATE -> WAIT_CAL). It waits for the falling edge of the field flag
// and then stays in CALIBRATE for one whole frame, up to the next falling
// edge. During CALIBRATE six registers track the minimum and maximum of Y, Cr
// and Cb over a CAL_W x CAL_H pixel rectangle in the middle of each field;
// the first pixel of the rectangle loads all six.
// Keying: when enabled, an active pixel whose Y, Cr and Cb all lie within
// [min, max] is replaced by the framegrab pixel at the same frame position.
// The framegrab read address is issued FG_READ_LATENCY samples ahead (also
// across the end of a line), so the stored pixel arrives in the same cycle as
// the live one, whether or not it is used.
//
// Timing: pixel and fvh are registered once; latency 1 clock.
// Ports: fg_addr is {frame_row[9:0], column[9:0]}, frame row = 2*line + field.
// The FSM, the six min/max registers, the comparison and the prefetched read
// follow the document. The rectangle position (centred) and its size taken as
// 20 pixels wide by 40 lines of each field are this design's reading of the
// document's "20x40 rectangle in the center".
// Lint: the h rising edge and the field low-to-high edge outputs of the shared
// position counter are not used by this block.
module bluescreen
  import vfx_pkg::*;
#(
  parameter int unsigned CAL_X0 = 350,   // first pixel column of the rectangle
  parameter int unsigned CAL_W  = 20,
  parameter int unsigned CAL_L0 = 100,   // first field line of the rectangle
  parameter int unsigned CAL_H  = 40
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        enable,
  input  logic        cal_start,
  input  pixel_t      ycrcb_in,
  input  fvh_t        fvh_in,
  output pixel_t      ycrcb_out,
  output fvh_t        fvh_out,
  output logic [19:0] fg_addr,
  input  pixel_t      fg_data,
  output logic        calibrating
);
  typedef enum logic [1:0] {S_WAIT_CAL, S_WAIT_SYNC, S_CALIBRATE} bs_state_e;
  bs_state_e state;

  logic [10:0] samp;
  logic [9:0]  line, xpix;
  logic        field, active, h_rise, f_l2h, f_h2l;
  video_position pos (.clk, .rst, .fvh_in, .samp, .line, .field, .active, .xpix,
                      .h_rise, .field_l2h(f_l2h), .field_h2l(f_h2l));

  // ---- prefetched framegrab address ----
  logic [11:0] ahead;
  logic [9:0]  ax;
  always_comb begin
    ahead = 12'(samp) + 12'(FG_READ_LATENCY);
    if (ahead >= 12'(SAMPLES_PER_LINE)) ahead = ahead - 12'(SAMPLES_PER_LINE);
    ax = (ahead < 12'(ACTIVE_SAMPLES)) ? ahead[10:1] : 10'd0;
    fg_addr = {line[8:0], field, ax};
  end

  // ---- calibration FSM ----
  always_ff @(posedge clk) begin
    if (rst) state <= S_WAIT_CAL;
    else unique case (state)
      S_WAIT_CAL:  if (cal_start) state <= S_WAIT_SYNC;
      S_WAIT_SYNC: if (f_h2l)     state <= S_CALIBRATE;
      S_CALIBRATE: if (f_h2l)     state <= S_WAIT_CAL;
      default:     state <= S_WAIT_CAL;
    endcase
  end
  assign calibrating = (state == S_CALIBRATE);

  // ---- min / max registers ----
  pixel_t mn, mx;
  logic   first;
  logic   in_rect;
  assign in_rect = active && (xpix >= 10'(CAL_X0)) && (xpix < 10'(CAL_X0 + CAL_W)) &&
                   (line >= 10'(CAL_L0)) && (line < 10'(CAL_L0 + CAL_H));

  always_ff @(posedge clk) begin
    if (rst) begin
      mn <= '1; mx <= '0; first <= 1'b1;
    end else if (state != S_CALIBRATE) begin
      first <= 1'b1;
    end else if (in_rect) begin
      first <= 1'b0;
      if (first) begin
        mn <= ycrcb_in; mx <= ycrcb_in;
      end else begin
        if (ycrcb_in.y  < mn.y)  mn.y  <= ycrcb_in.y;
        if (ycrcb_in.cr < mn.cr) mn.cr <= ycrcb_in.cr;
        if (ycrcb_in.cb < mn.cb) mn.cb <= ycrcb_in.cb;
        if (ycrcb_in.y  > mx.y)  mx.y  <= ycrcb_in.y;
        if (ycrcb_in.cr > mx.cr) mx.cr <= ycrcb_in.cr;
        if (ycrcb_in.cb > mx.cb) mx.cb <= ycrcb_in.cb;
      end
    end
  end

  // ---- key and output latch ----
  logic is_blue;
  assign is_blue = (ycrcb_in.y  >= mn.y)  && (ycrcb_in.y  <= mx.y)  &&
                   (ycrcb_in.cr >= mn.cr) && (ycrcb_in.cr <= mx.cr) &&
                   (ycrcb_in.cb >= mn.cb) && (ycrcb_in.cb <= mx.cb);

  always_ff @(posedge clk) begin
    if (rst) begin
      ycrcb_out <= '0;
      fvh_out   <= '{f: 1'b0, v: 1'b1, h: 1'b1};
    end else begin
      ycrcb_out <= (enable && active && is_blue) ? fg_data : ycrcb_in;
      fvh_out   <= fvh_in;
    end
  end
endmodule
