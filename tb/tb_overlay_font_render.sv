// tb_overlay_font_render -- sweeps all 720x24 text-buffer addresses for a
// string containing normal and inverted (bit 7 set) characters, with the
// one-cycle font ROM model, and checks every output pixel against
// glyph(code*12 + row/2) bit (7 - (col/2) mod 8) of character col/16, and
// that row/col/valid come out one clock later.
module tb_overlay_font_render;
  import tb_vid_pkg::*;
  localparam int N = 48;
  logic clk = 0;
  logic [4:0] row = 0, row_o; logic [9:0] col = 0, col_o; logic valid = 0, valid_o, pixel;
  logic [10:0] fa; logic [7:0] fb;
  logic [8*N-1:0] text;
  int checks = 0, failures = 0, ones = 0;
  always #5 clk = ~clk;
  overlay_font_render #(.NCHAR(N)) dut (.clk, .row, .col, .valid, .text, .font_addr(fa), .font_byte(fb),
    .row_out(row_o), .col_out(col_o), .valid_out(valid_o), .pixel);
  font_rom_model rom (.clk, .addr(fa), .data(fb));
  function automatic logic expected(input int r, input int c);
    logic [7:0] code; logic [7:0] g;
    code = text[8*(N-1-c/16) +: 8];
    g = font_glyph(11'(code[6:0] * 12 + r / 2));
    return g[7 - (c / 2) % 8] ^ code[7];
  endfunction
  always @(posedge clk) if (valid_o) begin
    checks++;
    if (pixel !== expected(row_o, col_o)) begin
      failures++; if (failures < 10) $display("FAIL r%0d c%0d", row_o, col_o); end
    if (pixel) ones++;
  end
  initial begin
    for (int i = 0; i < N; i++) text[8*(N-1-i) +: 8] = (i % 7 == 3) ? 8'd32 : 8'(33 + i + ((i % 5 == 0) ? 128 : 0));
    @(negedge clk);
    for (int r = 0; r < 24; r++)
      for (int c = 0; c < 720; c++) begin
        row = 5'(r); col = 10'(c); valid = 1; @(negedge clk);
        checks++;
        if (!(valid_o && row_o == 5'(r) && col_o == 10'(c))) begin failures++; $display("FAIL delay"); end
      end
    valid = 0; repeat (3) @(negedge clk);
    checks++; if (ones < 1000) begin failures++; $display("FAIL too few set pixels %0d", ones); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #5000000; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
