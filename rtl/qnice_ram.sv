// qnice_ram -- main memory: 2**ADDR_W words of 16 bits.
//
// Single port, synchronous: on a rising edge a write stores wdata at addr;
// a read (re) returns the word at addr on rdata after that edge, i.e. one
// cycle later, and rdata holds its value until the next read. The 16-bit word
// width and 16-bit address follow the architecture; the synchronous single
// port is this design's choice. Contents are not reset.
module qnice_ram #(
  parameter int unsigned ADDR_W = 16
) (
  input  logic              clk,
  input  logic              re,
  input  logic              we,
  input  logic [ADDR_W-1:0] addr,
  input  logic [15:0]       wdata,
  output logic [15:0]       rdata
);

  logic [15:0] mem [2**ADDR_W];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
    if (re) rdata <= mem[addr];
  end

endmodule
