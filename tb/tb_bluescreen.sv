// tb_bluescreen -- a solid "blue" box (luma 300..303, Cr 600, Cb 100) covers
// a small calibration rectangle. After calibration over one frame and with
// the keyer enabled, every pixel in that colour range must be replaced by the
// framegrab pixel at its own frame position (modelled here as a function of
// the address, returned 3 cycles after it), and every other pixel must pass
// unchanged, one cycle late. Before calibration/enable nothing is replaced.
module tb_bluescreen;
  import vfx_pkg::*;
  import tb_vid_pkg::*;
  localparam int AL = 8, BL = 2, LL = (AL + BL) * 1716;
  localparam pixel_t B = '{y: 10'd300, cr: 10'd600, cb: 10'd100};
  logic clk = 0, rst = 1;
  pixel_t pix, out, fgd; fvh_t fvh, fvh_o; int cur_line, frames;
  logic en = 0, cal = 0, calibrating;
  logic [19:0] fga, a1, a2;
  int checks = 0, failures = 0, replaced = 0, passed = 0;
  always #5 clk = ~clk;
  video_source #(.ACTIVE_LINES(AL), .BLANK_LINES(BL)) src (.clk, .rst, .solid(1'b1), .solid_pix(B),
    .solid_x0(90), .solid_x1(200), .solid_l0(1), .solid_l1(6), .pix, .fvh, .cur_line, .frames);
  bluescreen #(.CAL_X0(100), .CAL_W(20), .CAL_L0(2), .CAL_H(3)) dut (.clk, .rst, .enable(en), .cal_start(cal),
    .ycrcb_in(pix), .fvh_in(fvh), .ycrcb_out(out), .fvh_out(fvh_o), .fg_addr(fga), .fg_data(fgd),
    .calibrating);

  function automatic pixel_t fgfun(input logic [19:0] a);
    return '{y: a[19:10], cr: a[9:0], cb: 10'h155};
  endfunction
  // framegrab read path model: 3-cycle latency
  always_ff @(posedge clk) begin a1 <= fga; a2 <= a1; fgd <= fgfun(a2); end

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; if (failures < 12) $display("FAIL %s at %0t", what, $time); end
  endtask

  // reference: position of the input sample, one cycle late
  pixel_t pin_q; fvh_t fvh_q; int line_q, s_q; int s_ref = 0; logic h_prev = 1;
  always @(posedge clk) if (!rst) begin
    int s_now;
    s_now = (h_prev && !fvh.h) ? 0 : s_ref;
    h_prev <= fvh.h;
    s_ref <= s_now + 1;
    // check the output for the sample of the previous cycle
    if (fvh_q.h == 0 && fvh_q.v == 0 && s_q < 1440 && frames >= 1) begin
      logic inr; pixel_t e;
      inr = pin_q.y >= 300 && pin_q.y <= 303 && pin_q.cr == 600 && pin_q.cb == 100;
      e = (en && inr && !calibrating) ? fgfun({10'(2 * line_q + fvh_q.f), 10'(s_q / 2)}) : pin_q;
      if (!calibrating) begin
        chk(out == e, $sformatf("pixel line %0d x %0d", line_q, s_q / 2));
        if (en && inr) replaced++; else passed++;
      end
    end
    if (s_ref > 2 || frames > 0) chk(fvh_o == fvh_q, "fvh delay");
    pin_q <= pix; fvh_q <= fvh; line_q <= cur_line; s_q <= s_now;
  end

  int cal_cycles;
  initial begin
    repeat (3) @(posedge clk); rst = 0;
    repeat (2 * LL + 100) @(posedge clk);
    @(negedge clk) cal = 1; @(negedge clk) cal = 0;
    wait (calibrating == 1);
    chk(fvh.f == 0, "calibration starts at field 0");
    while (calibrating) begin @(posedge clk); cal_cycles++; end
    chk(cal_cycles > 2 * LL - 10 && cal_cycles < 2 * LL + 10, $sformatf("calibration lasts one frame (%0d)", cal_cycles));
    en = 1;
    repeat (2 * LL) @(posedge clk);
    chk(replaced > 100, $sformatf("replacements seen %0d", replaced));
    chk(passed > 100, "pass-through seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10 * LL) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
