// framegrab -- captures one complete frame of video into an external ZBT
// SRAM and serves reads of the stored frame to the overlay or bluescreen
// block.
//
// A trigger starts the write-enable FSM: WAIT_TRIG -> WAIT_SYNC, which waits
// for the falling edge of the field flag (start of the first field), then
// FIELD_0, which writes until the field flag rises, then FIELD_1, which writes
// until it falls again, and back to WAIT_TRIG. While writing, the row/column
// counters address the SRAM: the pixel at field line l, column x of field f
// goes to word (2*l + f) * 720 + x, so the two fields are stored interleaved
// as a full 480 x 720 frame (one SRAM word per pixel, bits 35:30 zero). Only
// the first FIELD_LINES lines of each field are stored.
// When not writing, a multiplexer selects the read address from the overlay
// port (addr_select = 0) or the bluescreen port (addr_select = 1); both are
// {row[9:0], col[9:0]} and map to row * 720 + col.
//
// Timing: SRAM address, write enable and data are registered; read data
// appears on read_data FG_READ_LATENCY (3) clocks after the read address.
// Reads are not served while a capture is in progress.
// The FSM states, the address mux and the address mapping follow the
// document; the FSM moves on edges of the field flag as the document's final
// design does. Writing once per pixel (on its first sample) is this design's
// choice.
// Lint: ram_rdata[35:30] are the six unused bits of each 36-bit word; only
// sample bit 0 is needed here (one write per pixel), and the h rising edge
// output of the shared position counter is not used.
module framegrab
  import vfx_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  pixel_t      ycrcb_in,
  input  fvh_t        fvh_in,
  input  logic        trigger,
  input  logic        addr_select,
  input  logic [19:0] o_addr,
  input  logic [19:0] b_addr,
  output logic [29:0] read_data,
  output logic [18:0] ram_addr,
  output logic        ram_we,
  output logic [35:0] ram_wdata,
  input  logic [35:0] ram_rdata,
  output logic [1:0]  state_out
);
  typedef enum logic [1:0] {S_WAIT_TRIG, S_WAIT_SYNC, S_FIELD_0, S_FIELD_1} fg_state_e;
  fg_state_e state;

  logic [10:0] samp;
  logic [9:0]  line, xpix;
  logic        field, active, h_rise, f_l2h, f_h2l;
  video_position pos (.clk, .rst, .fvh_in, .samp, .line, .field, .active, .xpix,
                      .h_rise, .field_l2h(f_l2h), .field_h2l(f_h2l));

  always_ff @(posedge clk) begin
    if (rst) state <= S_WAIT_TRIG;
    else unique case (state)
      S_WAIT_TRIG: if (trigger) state <= S_WAIT_SYNC;
      S_WAIT_SYNC: if (f_h2l)   state <= S_FIELD_0;
      S_FIELD_0:   if (f_l2h)   state <= S_FIELD_1;
      S_FIELD_1:   if (f_h2l)   state <= S_WAIT_TRIG;
    endcase
  end
  assign state_out = state;

  logic        writing, we_now;
  logic [18:0] wr_addr, rd_addr;
  logic [19:0] sel_addr;

  assign writing  = (state == S_FIELD_0) || (state == S_FIELD_1);
  assign we_now   = writing && active && !samp[0] && (line < 10'(FIELD_LINES));
  assign wr_addr  = 19'({line[8:0], field}) * 19'(LINE_PIXELS) + 19'(xpix);
  assign sel_addr = addr_select ? b_addr : o_addr;
  assign rd_addr  = 19'(sel_addr[19:10]) * 19'(LINE_PIXELS) + 19'(sel_addr[9:0]);

  always_ff @(posedge clk) begin
    if (rst) begin
      ram_we    <= 1'b0;
      ram_addr  <= '0;
      ram_wdata <= '0;
    end else begin
      ram_we    <= we_now;
      ram_addr  <= writing ? wr_addr : rd_addr;
      ram_wdata <= {6'b0, ycrcb_in};
    end
  end
  assign read_data = ram_rdata[29:0];
endmodule
