// font_load_fsm -- steps through every pixel of a 720x24 text overlay buffer.
//
// Follows Figure 4 of the document: wait for start (the return key), wait
// for the overlay module's ready, then count through all pixel addresses
// of the text buffer, then one DONE cycle (which clears the keyboard
// buffer) and back to waiting. The counter is reset while waiting for
// ready.
// Interface: start (pulse), ready (level from the overlay). While busy is
// high, row (0..23) and col (0..719) give one buffer address per clock,
// column fastest. done is high for the one DONE cycle. 17280 clocks in all.
// idle is high while waiting for start.
module font_load_fsm #(
  parameter int ROWS = 24,
  parameter int COLS = 720
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       start,
  input  logic       ready,
  output logic [4:0] row,
  output logic [9:0] col,
  output logic       busy,
  output logic       done,
  output logic       idle
);
  typedef enum logic [1:0] {WAIT_START, WAIT_READY, COUNT, DONE} state_e;
  state_e state;

  always_ff @(posedge clk)
    if (rst) begin
      state <= WAIT_START;
      row   <= '0;
      col   <= '0;
    end else
      unique case (state)
        WAIT_START: if (start) state <= WAIT_READY;
        WAIT_READY: begin
          row <= '0;
          col <= '0;
          if (ready) state <= COUNT;
        end
        COUNT:
          if (int'(col) == COLS - 1) begin
            col <= '0;
            if (int'(row) == ROWS - 1) state <= DONE;
            else row <= row + 1'b1;
          end else col <= col + 1'b1;
        DONE: state <= WAIT_START;
      endcase

  assign busy = (state == COUNT);
  assign done = (state == DONE);
  assign idle = (state == WAIT_START);
endmodule
