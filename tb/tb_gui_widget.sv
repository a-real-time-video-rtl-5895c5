// tb_gui_widget -- one check box, one option button and one pushbutton on a
// 10 ns system clock with a separate 7 ns pixel clock. Checks: a click over
// the check box toggles it once however long the button is held, clicks
// elsewhere do nothing, the bottom edge row counts as over (as in the
// document); the option reports one 'clicked' pulse per click; the
// pushbutton's 'down' follows click & over. After the synchroniser settles,
// every pixel of each sprite is checked: border 7, check box/option fill 2
// when set and 4 when clear, pushbutton fill 0, inverted to 7 while down,
// and 0 outside.
module tb_gui_widget;
  import vfx_pkg::*;
  logic clk = 0, vclk = 0, rst = 1, click = 0, status = 0;
  logic [9:0] mx = 0, my = 0; logic [10:0] hc = 0; logic [9:0] vc = 0;
  logic v_cb, v_op, v_bt, c_cb, c_op, c_bt; logic [2:0] p_cb, p_op, p_bt;
  int checks = 0, failures = 0, op_clicks = 0;
  always #5 clk = ~clk;
  always #3.5 vclk = ~vclk;
  gui_widget #(.KIND(W_CHECKBOX), .X(100), .Y(50)) cb (.clk, .rst, .vclk, .mx, .my, .click,
    .status(1'b0), .hcount(hc), .vcount(vc), .value(v_cb), .clicked(c_cb), .pixel(p_cb));
  gui_widget #(.KIND(W_OPTION), .X(100), .Y(80)) op (.clk, .rst, .vclk, .mx, .my, .click,
    .status, .hcount(hc), .vcount(vc), .value(v_op), .clicked(c_op), .pixel(p_op));
  gui_widget #(.KIND(W_BUTTON), .X(200), .Y(50), .WIDTH(100), .HEIGHT(16)) bt (.clk, .rst, .vclk,
    .mx, .my, .click, .status(1'b0), .hcount(hc), .vcount(vc), .value(v_bt), .clicked(c_bt), .pixel(p_bt));
  always @(posedge clk) if (c_op) op_clicks++;
  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; if (failures < 12) $display("FAIL %s at %0t", what, $time); end
  endtask
  task automatic press(input int x, input int y, input int len);
    @(negedge clk); mx = 10'(x); my = 10'(y); click = 1;
    repeat (len) @(negedge clk);
    click = 0; repeat (2) @(negedge clk);
  endtask
  task automatic sweep(input int x0, input int y0, input int w, input int h, input int sel,
                       input logic [2:0] fill, input string what);
    repeat (4) @(posedge vclk);
    for (int y = y0 - 2; y < y0 + h + 2; y++)
      for (int x = x0 - 2; x < x0 + w + 2; x++) begin
        logic [2:0] e, p;
        hc = 11'(x); vc = 10'(y); #0.1;
        p = (sel == 0) ? p_cb : (sel == 1) ? p_op : p_bt;
        if (x < x0 || x >= x0 + w || y < y0 || y >= y0 + h) e = 0;
        else if (x == x0 || x == x0 + w - 1 || y == y0 || y == y0 + h - 1) e = 7;
        else e = fill;
        chk(p == e, $sformatf("%s pixel %0d,%0d got %0d exp %0d", what, x, y, p, e));
      end
  endtask
  initial begin
    repeat (2) @(posedge clk); @(negedge clk) rst = 0;
    sweep(100, 50, 16, 16, 0, 3'd4, "check box clear");
    press(105, 55, 1); chk(v_cb == 1, "check box set");
    press(105, 66, 20); chk(v_cb == 0, "bottom edge row counts, long press toggles once");
    press(99, 55, 1); chk(v_cb == 0, "click left of box ignored");
    press(116, 55, 1); chk(v_cb == 0, "click right of box ignored");
    press(110, 60, 3); chk(v_cb == 1, "set again");
    sweep(100, 50, 16, 16, 0, 3'd2, "check box set");
    press(105, 85, 5); chk(op_clicks == 1, "option clicked once");
    press(150, 85, 5); chk(op_clicks == 1, "option not clicked outside");
    chk(v_op == 0, "option value is external status");
    status = 1; #1 chk(v_op == 1, "option value follows status");
    sweep(100, 80, 16, 16, 1, 3'd2, "option selected");
    status = 0; sweep(100, 80, 16, 16, 1, 3'd4, "option not selected");
    sweep(200, 50, 100, 16, 2, 3'd0, "button up");
    @(negedge clk); mx = 250; my = 60; click = 1; @(negedge clk);
    chk(v_bt == 1, "button down while pressed over it");
    sweep(200, 50, 100, 16, 2, 3'd7, "button down");
    @(negedge clk); mx = 350; @(negedge clk);
    chk(v_bt == 0, "button up when mouse leaves");
    click = 0; @(negedge clk);
    chk(v_bt == 0 && c_bt == 0, "button released");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #20000000; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
