// xvga -- 1024x768 VGA timing generator for the 65 MHz pixel clock.
//
// The document gives the resolution and pixel clock only; the porch and
// sync widths are this design's assumption (the common 1024x768 @ 60 Hz
// timing: 1344 clocks per line, 806 lines per frame, negative syncs).
// Outputs hcount (0..1343), vcount (0..805) and registered hsync, vsync
// (active low) and blank (high outside the 1024x768 visible area), all
// aligned with hcount/vcount.
module xvga #(
  parameter int H_ACTIVE = 1024, H_FRONT = 24, H_SYNC = 136, H_BACK = 160,
  parameter int V_ACTIVE = 768,  V_FRONT = 3,  V_SYNC = 6,   V_BACK = 29
) (
  input  logic        clk,
  input  logic        rst,
  output logic [10:0] hcount,
  output logic [9:0]  vcount,
  output logic        hsync,
  output logic        vsync,
  output logic        blank
);
  localparam int H_TOTAL = H_ACTIVE + H_FRONT + H_SYNC + H_BACK;
  localparam int V_TOTAL = V_ACTIVE + V_FRONT + V_SYNC + V_BACK;
  logic [10:0] hn;
  logic [9:0]  vn;
  always_comb begin
    hn = hcount + 1'b1;
    vn = vcount;
    if (int'(hcount) == H_TOTAL - 1) begin
      hn = '0;
      vn = (int'(vcount) == V_TOTAL - 1) ? '0 : vcount + 1'b1;
    end
  end
  always_ff @(posedge clk)
    if (rst) begin
      hcount <= '0;
      vcount <= '0;
      hsync  <= 1'b1;
      vsync  <= 1'b1;
      blank  <= 1'b0;
    end else begin
      hcount <= hn;
      vcount <= vn;
      hsync  <= ~(int'(hn) >= H_ACTIVE + H_FRONT && int'(hn) < H_ACTIVE + H_FRONT + H_SYNC);
      vsync  <= ~(int'(vn) >= V_ACTIVE + V_FRONT && int'(vn) < V_ACTIVE + V_FRONT + V_SYNC);
      blank  <= (int'(hn) >= H_ACTIVE) || (int'(vn) >= V_ACTIVE);
    end
endmodule
