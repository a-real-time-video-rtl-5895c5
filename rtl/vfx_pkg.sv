// vfx_pkg -- types and constants shared by the video effects processor.
//
// The video datapath carries 4:2:2 NTSC video as one 30-bit YCrCb pixel per
// two clock cycles of the 27 MHz line-locked clock, with a 3-bit field /
// vertical-blank / horizontal-blank bundle (fvh) travelling alongside it.
// Line and frame sizes follow CCIR656 NTSC (1716 samples per line, 1440 of
// them active, 720 pixels). The overlay programming codes are those of the
// control-to-overlay bus (select values 000..110). The ZBT latency and the
// white level are this design's own choices.
// Lint: some constants here are documentation of the format and are not
// used by every module, so Verilator reports them as unused.
package vfx_pkg;

  // One pixel: bits 29:20 luma, 19:10 Cr, 9:0 Cb.
  typedef struct packed {
    logic [9:0] y;
    logic [9:0] cr;
    logic [9:0] cb;
  } pixel_t;

  // Field, vertical blanking and horizontal blanking flags of CCIR656.
  typedef struct packed {
    logic f;
    logic v;
    logic h;
  } fvh_t;

  localparam int unsigned SAMPLES_PER_LINE = 1716;  // NTSC CCIR656 line length
  localparam int unsigned ACTIVE_SAMPLES   = 1440;  // two samples per pixel
  localparam int unsigned LINE_PIXELS      = 720;
  localparam int unsigned FIELD_LINES      = 240;   // stored / addressed lines per field
  localparam int unsigned FRAME_ROWS       = 480;

  // External ZBT SRAM: data returns this many cycles after the address.
  localparam int unsigned RAM_LATENCY = 2;
  // Framegrab read port: one address register plus the SRAM latency.
  localparam int unsigned FG_READ_LATENCY = RAM_LATENCY + 1;

  // Overlay colour: nominal 10-bit white with neutral chroma.
  localparam pixel_t WHITE = '{y: 10'd940, cr: 10'd512, cb: 10'd512};

  // Overlay programming bus select codes.
  typedef enum logic [2:0] {
    SEL_TEXT1_BUF = 3'b000,
    SEL_TEXT1_POS = 3'b001,
    SEL_TEXT2_BUF = 3'b010,
    SEL_TEXT2_POS = 3'b011,
    SEL_FG_POS    = 3'b100,
    SEL_UNUSED5   = 3'b101,
    SEL_TRACE_BUF = 3'b110,
    SEL_UNUSED7   = 3'b111
  } ovl_sel_e;

  // Zoom magnification code.
  typedef enum logic [1:0] {
    ZOOM_2X = 2'd0,
    ZOOM_3X = 2'd1,
    ZOOM_4X = 2'd2,
    ZOOM_NONE = 2'd3
  } zoom_mag_e;

  // Kinds of GUI widget.
  typedef enum logic [1:0] {
    W_CHECKBOX = 2'd0,
    W_OPTION   = 2'd1,
    W_BUTTON   = 2'd2
  } widget_kind_e;

endpackage
