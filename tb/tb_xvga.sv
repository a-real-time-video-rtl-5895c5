// tb_xvga -- runs two frames and checks the counters wrap at 1344 and 806,
// hsync is low for 136 clocks starting at hcount 1048, vsync low for 6 lines
// starting at line 771, and blank is high exactly outside 1024x768.
module tb_xvga;
  logic clk = 0, rst = 1, hs, vs, bl;
  logic [10:0] hc; logic [9:0] vc;
  int checks = 0, failures = 0, hs_low = 0, vs_lines = 0, frames = 0;
  always #5 clk = ~clk;
  xvga dut (.clk, .rst, .hcount(hc), .vcount(vc), .hsync(hs), .vsync(vs), .blank(bl));
  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; if (failures < 12) $display("FAIL %s at %0t", what, $time); end
  endtask
  logic [10:0] hp = 0; logic [9:0] vp = 0; logic started = 0;
  always @(posedge clk) if (!rst) begin
    if (started) begin
      if (hp == 1343) chk(hc == 0 && vc == (vp == 805 ? 0 : vp + 1), "line wrap");
      else chk(hc == hp + 1 && vc == vp, "count");
    end
    started <= 1; hp <= hc; vp <= vc;
    chk(bl == (hc >= 1024 || vc >= 768), $sformatf("blank at %0d,%0d", hc, vc));
    chk(hs == !(hc >= 1048 && hc < 1184), $sformatf("hsync at %0d", hc));
    chk(vs == !(vc >= 771 && vc < 777), $sformatf("vsync at line %0d", vc));
    if (hc == 0 && vc == 0) frames++;
  end
  initial begin
    repeat (2) @(posedge clk); @(negedge clk) rst = 0;
    wait (frames == 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #30000000; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
