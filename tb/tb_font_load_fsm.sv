// tb_font_load_fsm -- starts the FSM while ready is low, raises ready later,
// and checks: nothing counts before ready, the addresses step row by row,
// column fastest, through all 720x24 pixels exactly once, done is a single
// cycle right after the last address, and a second start works again.
module tb_font_load_fsm;
  logic clk = 0, rst = 1, start = 0, ready = 0, busy, done, idle;
  logic [4:0] row; logic [9:0] col;
  int checks = 0, failures = 0, n = 0, dones = 0;
  logic last_busy = 0;
  always #5 clk = ~clk;
  font_load_fsm dut (.clk, .rst, .start, .ready, .row, .col, .busy, .done, .idle);
  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; if (failures < 12) $display("FAIL %s at %0t", what, $time); end
  endtask
  always @(posedge clk) if (!rst) begin
    if (busy) begin
      chk(int'(row) == n / 720 && int'(col) == n % 720, $sformatf("address %0d: row %0d col %0d", n, row, col));
      n++;
    end
    if (done) begin dones++; chk(last_busy && n == 17280, $sformatf("done after last address (n=%0d)", n)); end
    last_busy <= busy;
  end
  initial begin
    repeat (2) @(posedge clk); @(negedge clk) rst = 0;
    repeat (5) @(negedge clk);
    chk(!busy && !done && idle, "idle before start");
    start = 1; @(negedge clk) start = 0;
    repeat (50) @(negedge clk);
    chk(n == 0 && !idle, "waits for ready");
    ready = 1;
    wait (dones == 1);
    repeat (5) @(negedge clk);
    chk(!busy && idle, "idle after done");
    n = 0;
    start = 1; @(negedge clk) start = 0;
    wait (dones == 2);
    chk(n == 17280, "second run complete");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #2000000; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
