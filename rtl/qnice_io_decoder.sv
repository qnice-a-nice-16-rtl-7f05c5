// qnice_io_decoder -- memory-mapped I/O decoding of the processor bus.
//
// Addresses at or above IO_BASE (the upper 1k words) go to the I/O bus,
// all others to main memory. Requests are steered combinationally; read data
// returns one cycle after the request on both sides, so the decoder
// remembers where the last read went and returns that side's data.
// The address window is the architecture's; the I/O bus signals and their
// one-cycle read timing are this design's choice.
module qnice_io_decoder
  import qnice_pkg::*;
#(
  parameter logic [15:0] IO_BASE_ADDR = IO_BASE
) (
  input  logic        clk,
  input  logic        rst_n,
  // processor side
  input  logic [15:0] cpu_addr,
  input  logic        cpu_re,
  input  logic        cpu_we,
  output logic [15:0] cpu_rdata,
  // memory side
  output logic        ram_re,
  output logic        ram_we,
  input  logic [15:0] ram_rdata,
  // I/O side
  output logic        io_re,
  output logic        io_we,
  input  logic [15:0] io_rdata
);

  logic is_io;
  logic last_io;

  assign is_io  = (cpu_addr >= IO_BASE_ADDR);
  assign ram_re = cpu_re && !is_io;
  assign ram_we = cpu_we && !is_io;
  assign io_re  = cpu_re && is_io;
  assign io_we  = cpu_we && is_io;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      last_io <= 1'b0;
    else if (cpu_re) last_io <= is_io;
  end

  assign cpu_rdata = last_io ? io_rdata : ram_rdata;

endmodule
