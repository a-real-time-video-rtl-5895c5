// level_to_pulse -- turns a level into a single-cycle pulse on its rising edge.
//
// Used by the control module on the framegrab TRIGGER, bluescreen CALIBRATE
// and trace CLEAR pushbuttons, as the document describes ("a level-to-pulse
// converter that outputs a single high pulse after the rising edge").
// Interface: level in, pulse out. pulse is high for the one clock that
// follows the first clock in which level is sampled high. Reset clears the
// history register, so a level already high when reset releases gives one
// pulse; this reset behaviour is this design's own choice.
module level_to_pulse (
  input  logic clk,
  input  logic rst,
  input  logic level,
  output logic pulse
);
  logic last;
  always_ff @(posedge clk)
    if (rst) begin
      last  <= 1'b0;
      pulse <= 1'b0;
    end else begin
      last  <= level;
      pulse <= level & ~last;
    end
endmodule
