// gui_widget -- one GUI sprite: check box, option button or pushbutton.
//
// Follows the document's widgets: a WIDTH x HEIGHT box at (X,Y) with a
// white (7) one-pixel border. A check box keeps its own state bit, toggled
// by a new click over it, and fills green (2) when set and red (4) when
// clear. An option button has no state of its own: it reports a new click
// over it on 'clicked' and draws from the external status input. A
// pushbutton outputs 'down' while the mouse button is held over it and
// draws FILLCOLOR, inverted while down if INVERT_ON_CLICK.
// Clock domains: state and click logic run on clk (the system clock); the
// drawing runs on vclk (65 MHz) and sees the state through a two-flop
// synchroniser, as in the document. pixel is combinational from hcount/
// vcount. The hover test uses the same (inclusive) bottom edge as the
// document's widgets.
module gui_widget
  import vfx_pkg::*;
#(
  parameter widget_kind_e KIND = W_CHECKBOX,
  parameter int X = 0,
  parameter int Y = 0,
  parameter int WIDTH = 16,
  parameter int HEIGHT = 16,
  parameter logic [2:0] COLOR = 3'd7,
  parameter logic [2:0] FILLCOLOR = 3'd0,
  parameter bit INVERT_ON_CLICK = 1'b1
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        vclk,
  input  logic [9:0]  mx,
  input  logic [9:0]  my,
  input  logic        click,
  input  logic        status,
  input  logic [10:0] hcount,
  input  logic [9:0]  vcount,
  output logic        value,
  output logic        clicked,
  output logic [2:0]  pixel
);
  logic last_click, state, s1, s2;
  wire over = (int'(mx) >= X) && (int'(mx) < X + WIDTH) && (int'(my) >= Y) && (int'(my) <= Y + HEIGHT);
  wire new_click = click & ~last_click;

  always_ff @(posedge clk)
    if (rst) begin
      last_click <= 1'b0;
      state      <= 1'b0;
    end else begin
      last_click <= click;
      if (KIND == W_CHECKBOX && new_click && over) state <= ~state;
    end

  assign clicked = new_click & over;
  always_comb
    unique case (KIND)
      W_CHECKBOX: value = state;
      W_OPTION:   value = status;
      default:    value = click & over;
    endcase

  always_ff @(posedge vclk) begin
    s1 <= value;
    s2 <= s1;
  end

  wire in_box = (int'(hcount) >= X) && (int'(hcount) < X + WIDTH) &&
                (int'(vcount) >= Y) && (int'(vcount) < Y + HEIGHT);
  wire border = (int'(hcount) == X) || (int'(hcount) + 1 == X + WIDTH) ||
                (int'(vcount) == Y) || (int'(vcount) + 1 == Y + HEIGHT);
  always_comb begin
    pixel = 3'd0;
    if (in_box) begin
      if (KIND == W_BUTTON)
        pixel = border ? COLOR : ((INVERT_ON_CLICK && s2) ? ~FILLCOLOR : FILLCOLOR);
      else
        pixel = border ? 3'd7 : (s2 ? 3'd2 : 3'd4);
    end
  end
endmodule
