// keyboard_buffer -- 48-character register file holding what the user types.
//
// Follows the document: 48 one-byte locations, a counter giving the next
// location to write, a character stored whenever the keyboard signals a new
// key, locations at or above the counter shown as blanks, and clearing done
// by resetting the counter to 0.
// This design's own choices: backspace (ASCII 8) steps the counter back; the
// return key (ASCII 13) is not stored but produces the one-cycle enter
// pulse that starts the text render; key strobes are edge-detected so a
// ready level lasting several clocks stores one character; characters typed
// when the buffer is full are dropped.
// Interface: key_ready/ascii from the keyboard, clear from the font render
// FSM (done). text is the whole buffer with blanked positions as spaces,
// character 0 in the top byte, so it plugs straight into text_display and
// into the overlay text renderer. text changes one clock after the key.
module keyboard_buffer #(
  parameter int DEPTH = 48
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic [7:0]           ascii,
  input  logic                 key_ready,
  input  logic                 clear,
  output logic [8*DEPTH-1:0]   text,
  output logic                 enter
);
  logic [7:0] mem [DEPTH];
  logic [$clog2(DEPTH+1)-1:0] count;
  logic       last_ready;
  wire        strobe = key_ready & ~last_ready;

  always_ff @(posedge clk) begin
    last_ready <= key_ready;
    enter      <= 1'b0;
    if (rst || clear) count <= '0;
    else if (strobe) begin
      if (ascii == 8'd13) enter <= 1'b1;
      else if (ascii == 8'd8) begin
        if (count != 0) count <= count - 1'b1;
      end else if (int'(count) < DEPTH) begin
        mem[count] <= ascii;
        count      <= count + 1'b1;
      end
    end
    if (rst) last_ready <= 1'b0;
  end

  always_comb
    for (int i = 0; i < DEPTH; i++)
      text[8*(DEPTH-1-i) +: 8] = (i < count) ? mem[i] : 8'd32;
endmodule
