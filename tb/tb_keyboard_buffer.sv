// tb_keyboard_buffer -- types characters (strobes of 1 and of several
// clocks), backspaces, return and more than 48 characters; checks the text
// vector (blank positions read as spaces) against a queue model, that
// return is not stored and gives one enter pulse, and that clear empties
// the buffer.
module tb_keyboard_buffer;
  localparam int D = 48;
  logic clk = 0, rst = 1, kr = 0, clr = 0, enter;
  logic [7:0] ascii = 0;
  logic [8*D-1:0] text;
  byte q[$];
  string hello = "HELLO";
  int checks = 0, failures = 0, enters = 0;
  always #5 clk = ~clk;
  keyboard_buffer #(.DEPTH(D)) dut (.clk, .rst, .ascii, .key_ready(kr), .clear(clr), .text, .enter);
  always @(posedge clk) if (enter) enters++;
  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; if (failures < 12) $display("FAIL %s at %0t", what, $time); end
  endtask
  task automatic key(input byte c, input int len = 1);
    @(negedge clk); ascii = c; kr = 1;
    repeat (len) @(negedge clk);
    kr = 0;
    if (c == 8) begin if (q.size() > 0) void'(q.pop_back()); end
    else if (c != 13 && q.size() < D) q.push_back(c);
    @(negedge clk);
  endtask
  task automatic compare(input string what);
    for (int i = 0; i < D; i++)
      chk(text[8*(D-1-i) +: 8] == (i < q.size() ? q[i] : 8'd32), $sformatf("%s pos %0d", what, i));
  endtask
  initial begin
    repeat (2) @(posedge clk); @(negedge clk) rst = 0;
    compare("empty after reset");
    for (int i = 0; i < hello.len(); i++) key(hello[i], 1 + i);
    compare("hello");
    key(8); key(8); key("P"); compare("backspace");
    key(13, 3); compare("enter not stored");
    chk(enters == 1, "one enter pulse");
    for (int i = 0; i < 60; i++) key(8'(65 + i % 26));
    compare("full buffer");
    for (int i = 0; i < 50; i++) key(8);
    compare("all erased"); chk(q.size() == 0, "queue empty");
    key("A"); key("B");
    @(negedge clk) clr = 1; @(negedge clk) clr = 0; q.delete();
    compare("cleared");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #10000000; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
