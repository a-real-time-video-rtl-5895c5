// video_position -- sample and line counters recovered from the fvh flags.
//
// Every datapath block needs to know where on the screen the current sample
// lies. The sample counter is forced to 0 on the first cycle of active video
// (the falling edge of h) and otherwise runs 0..1715, so it also counts
// through horizontal blanking and a block can look ahead into the next line.
// The line counter is held at 0 while v is high and advances on each rising
// edge of h (end of active video) that ends a line which carried active
// samples, so it numbers the active lines of a field from 0 whether the
// source clears v at the EAV or at the SAV of the first active line. `samp` and `line` are valid in the same cycle as fvh_in.
// A single counter design is used by all blocks; this is this design's own
// choice.
module video_position
  import vfx_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  fvh_t        fvh_in,
  output logic [10:0] samp,      // sample index in the line, 0 = first active sample
  output logic [9:0]  line,      // active line index in the field
  output logic        field,
  output logic        active,    // inside active video
  output logic [9:0]  xpix,      // pixel column (samp / 2)
  output logic        h_rise,
  output logic        field_l2h,
  output logic        field_h2l
);
  logic        h_q, f_q;
  logic [10:0] samp_q;
  logic [9:0]  line_q;
  logic        h_fall, had_active;

  assign h_fall    = h_q & ~fvh_in.h;
  assign h_rise    = ~h_q & fvh_in.h;
  assign field_l2h = ~f_q & fvh_in.f;
  assign field_h2l = f_q & ~fvh_in.f;

  assign samp   = h_fall ? 11'd0 : samp_q;
  assign line   = line_q;
  assign field  = fvh_in.f;
  assign active = ~fvh_in.v & ~fvh_in.h & (samp < 11'(ACTIVE_SAMPLES));
  assign xpix   = samp[10:1];

  always_ff @(posedge clk) begin
    if (rst) begin
      h_q    <= 1'b1;
      f_q    <= 1'b0;
      samp_q <= '0;
      line_q <= '0;
      had_active <= 1'b0;
    end else begin
      h_q    <= fvh_in.h;
      f_q    <= fvh_in.f;
      samp_q <= (samp == 11'(SAMPLES_PER_LINE - 1)) ? 11'd0 : samp + 11'd1;
      if (fvh_in.v)
        line_q <= '0;
      else if (h_rise && had_active)
        line_q <= line_q + 10'd1;
      if (h_rise || fvh_in.v) had_active <= 1'b0;
      else if (active)        had_active <= 1'b1;
    end
  end
endmodule
