// tb_level_to_pulse -- drives a random level (including long and one-cycle
// highs) and checks the pulse against a two-register edge model every clock.
module tb_level_to_pulse;
  logic clk = 0, rst = 1, level = 0, pulse;
  logic l1 = 0, exp_p = 0;
  int checks = 0, failures = 0, pulses = 0;
  always #5 clk = ~clk;
  level_to_pulse dut (.clk, .rst, .level, .pulse);
  always @(posedge clk) begin
    if (!rst) begin
      checks++;
      if (pulse !== exp_p) begin failures++; $display("FAIL pulse %b exp %b at %0t", pulse, exp_p, $time); end
      if (pulse) pulses++;
    end
    exp_p <= rst ? 1'b0 : (level & ~l1);
    l1 <= rst ? 1'b0 : level;
  end
  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    repeat (2000) begin
      @(negedge clk);
      level = ($urandom % 8 == 0) ? ~level : level;
    end
    @(negedge clk) level = 1; @(negedge clk) level = 0;
    repeat (3) @(negedge clk);
    checks++; if (pulses < 50) begin failures++; $display("FAIL too few pulses %0d", pulses); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
