// tb_framegrab -- captures a frame of a synthetic stream (6 active lines per
// field) into the SRAM model, then reads pixels back through both read
// ports and checks the data, the 3-cycle read latency, the FSM sequence and
// that nothing is written before the trigger or after the frame.
module tb_framegrab;
  import vfx_pkg::*;
  import tb_vid_pkg::*;
  localparam int AL = 6, BL = 2, LL = (AL + BL) * 1716;
  logic clk = 0, rst = 1;
  pixel_t pix; fvh_t fvh; int cur_line, frames;
  logic trigger = 0, sel = 0;
  logic [19:0] o_addr = 0, b_addr = 0;
  logic [29:0] rd;
  logic [18:0] ram_addr; logic ram_we; logic [35:0] ram_wdata, ram_rdata;
  logic [1:0] st;
  int checks = 0, failures = 0, writes = 0;
  always #5 clk = ~clk;
  video_source #(.ACTIVE_LINES(AL), .BLANK_LINES(BL)) src (.clk, .rst, .solid(1'b0), .solid_pix('0),
    .solid_x0(0), .solid_x1(0), .solid_l0(0), .solid_l1(0), .pix, .fvh, .cur_line, .frames);
  framegrab dut (.clk, .rst, .ycrcb_in(pix), .fvh_in(fvh), .trigger, .addr_select(sel),
    .o_addr, .b_addr, .read_data(rd), .ram_addr, .ram_we, .ram_wdata, .ram_rdata, .state_out(st));
  zbt_model ram (.clk, .addr(ram_addr), .we(ram_we), .wdata(ram_wdata), .rdata(ram_rdata));

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; if (failures < 12) $display("FAIL %s at %0t", what, $time); end
  endtask
  always @(posedge clk) if (ram_we && !rst) writes++;

  task automatic read_check(input int row, input int col, input logic use_b);
    pixel_t e;
    sel = use_b;
    if (use_b) begin b_addr = {10'(row), 10'(col)}; o_addr = '1; end
    else begin o_addr = {10'(row), 10'(col)}; b_addr = '1; end
    @(posedge clk); #1;
    o_addr = 0; b_addr = 0;
    @(posedge clk); @(posedge clk); #1;
    e = pat(row[0], row >> 1, col);
    chk(rd == e, $sformatf("read row %0d col %0d", row, col));
  endtask

  int seen_states;
  initial begin
    repeat (3) @(posedge clk); rst = 0;
    repeat (3 * LL) @(posedge clk);
    chk(writes == 0, "no writes before trigger");
    chk(st == 0, "idle state");
    @(negedge clk) trigger = 1; @(negedge clk) trigger = 0;
    chk(st == 1, "WAIT_SYNC after trigger");
    wait (st == 2); seen_states |= 4;
    chk(fvh.f == 0, "FIELD_0 starts in field 0");
    wait (st == 3); seen_states |= 8;
    chk(fvh.f == 1, "FIELD_1 in field 1");
    wait (st == 0);
    chk(writes == 2 * AL * 720, $sformatf("writes per frame %0d", writes));
    repeat (2 * LL) @(posedge clk);
    chk(writes == 2 * AL * 720, "no writes after the frame");
    for (int r = 0; r < 2 * AL; r++)
      for (int c = 0; c < 720; c += 97) read_check(r, c, (c % 2) == 1);
    read_check(2 * AL - 1, 719, 1'b0);
    read_check(0, 0, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (12 * LL) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
