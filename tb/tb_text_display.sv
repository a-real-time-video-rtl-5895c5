// tb_text_display -- two text blocks share one font ROM model through an
// ORed, registered address (as in the control module), driven by the real
// VGA timing generator. For two frames every pixel is compared with the
// expected glyph: inside a block, pixel = COLOR when bit (7 - x mod 8) of
// glyph(code*12 + row) xor code[7] is set; elsewhere 0. Also checks that a
// block's font address is zero outside its fetch window.
module tb_text_display;
  import tb_vid_pkg::*;
  logic clk = 0, rst = 1;
  logic [10:0] hc; logic [9:0] vc; logic hs, vs, bl;
  logic [10:0] a1, a2, aq; logic [7:0] fb; logic [2:0] p1, p2;
  localparam int N1 = 6, X1 = 74, Y1 = 258, N2 = 12, X2 = 641, Y2 = 602;
  logic [8*N1-1:0] t1 = "EN ABL";
  logic [8*N2-1:0] t2 = {"SET", 8'hD0, "OSITION", 8'h21};
  int checks = 0, failures = 0, frames = 0, lit = 0;
  always #5 clk = ~clk;
  xvga vga (.clk, .rst, .hcount(hc), .vcount(vc), .hsync(hs), .vsync(vs), .blank(bl));
  text_display #(.NCHAR(N1), .X(X1), .Y(Y1), .COLOR(3'd7)) d1 (.vclk(clk), .hcount(hc), .vcount(vc),
    .text(t1), .font_addr(a1), .font_byte(fb), .pixel(p1));
  text_display #(.NCHAR(N2), .X(X2), .Y(Y2), .COLOR(3'd3)) d2 (.vclk(clk), .hcount(hc), .vcount(vc),
    .text(t2), .font_addr(a2), .font_byte(fb), .pixel(p2));
  always_ff @(posedge clk) aq <= a1 | a2;
  font_rom_model rom (.clk, .addr(aq), .data(fb));
  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; if (failures < 12) $display("FAIL %s at %0t", what, $time); end
  endtask
  function automatic logic [2:0] expect_px(input int x, input int y, input int X, input int Y, input int N,
                                           input logic [95:0] t, input logic [2:0] col);
    logic [7:0] code, g;
    if (x < X || x >= X + 8 * N || y < Y || y >= Y + 12) return 3'd0;
    code = t[8*(N-1-(x-X)/8) +: 8];
    g = font_glyph(11'(code[6:0] * 12 + (y - Y)));
    return (g[7 - (x - X) % 8] ^ code[7]) ? col : 3'd0;
  endfunction
  always @(posedge clk) if (!rst && frames >= 1) begin
    logic [2:0] e1, e2;
    e1 = expect_px(hc, vc, X1, Y1, N1, 96'(t1), 3'd7);
    e2 = expect_px(hc, vc, X2, Y2, N2, 96'(t2), 3'd3);
    chk(p1 == e1, $sformatf("block 1 at %0d,%0d got %0d exp %0d", hc, vc, p1, e1));
    chk(p2 == e2, $sformatf("block 2 at %0d,%0d got %0d exp %0d", hc, vc, p2, e2));
    if (p1 != 0 || p2 != 0) lit++;
    if (!(int'(vc) >= Y1 && int'(vc) < Y1 + 12 && int'(hc) >= X1 - 16 && int'(hc) < X1 + 8 * N1 - 16))
      chk(a1 == 0, "block 1 address zero outside its window");
  end
  always @(posedge clk) if (!rst && hc == 0 && vc == 0) frames++;
  initial begin
    repeat (2) @(posedge clk); @(negedge clk) rst = 0;
    wait (frames == 3);
    chk(lit > 500, $sformatf("text visible (%0d lit pixels)", lit));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #40000000; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
