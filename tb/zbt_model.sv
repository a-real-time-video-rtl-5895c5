// zbt_model -- behavioural model of a 512K x 36 ZBT SRAM as used through a
// pipelining wrapper: address, write enable and write data are given in the
// same cycle; read data for an address given in cycle n is on rdata in
// cycle n + 2. Not synthesizable design content; simulation only.
module zbt_model #(parameter int AW = 19) (
  input  logic        clk,
  input  logic [AW-1:0] addr,
  input  logic        we,
  input  logic [35:0] wdata,
  output logic [35:0] rdata
);
  logic [35:0] mem [2**AW];
  logic [AW-1:0] a1;
  initial for (int i = 0; i < 2**AW; i++) mem[i] = '0;
  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
    a1    <= addr;
    rdata <= mem[a1];
  end
endmodule
