// qnice_system -- a complete QNICE machine: processor, main memory and
// memory-mapped I/O.
//
// The processor's bus is split by address: the upper 1k words
// (0xFC00..0xFFFF) form the I/O window and appear on the io_* ports for
// external I/O controllers, everything below is served by the internal
// 64K-word RAM (whose top 1k words are thus shadowed). An I/O read is issued
// with io_re and its data must be on io_rdata in the next cycle; an I/O
// write is io_we with io_wdata at io_addr. halted goes high after a HALT
// instruction; instr_done pulses once per completed instruction.
// The memory map is the architecture's; the I/O bus timing is this design's.
module qnice_system
  import qnice_pkg::*;
#(
  parameter int unsigned BANKS  = 256,
  parameter int unsigned ADDR_W = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  output logic [15:0] io_addr,
  output logic [15:0] io_wdata,
  output logic        io_re,
  output logic        io_we,
  input  logic [15:0] io_rdata,
  output logic        instr_done,
  output logic        halted
);

  logic [15:0] cpu_addr, cpu_wdata, cpu_rdata, ram_rdata;
  logic        cpu_re, cpu_we, ram_re, ram_we;

  qnice_cpu #(.BANKS(BANKS)) u_cpu (
    .clk        (clk),
    .rst_n      (rst_n),
    .mem_addr   (cpu_addr),
    .mem_wdata  (cpu_wdata),
    .mem_re     (cpu_re),
    .mem_we     (cpu_we),
    .mem_rdata  (cpu_rdata),
    .instr_done (instr_done),
    .halted     (halted)
  );

  qnice_io_decoder u_iodec (
    .clk       (clk),
    .rst_n     (rst_n),
    .cpu_addr  (cpu_addr),
    .cpu_re    (cpu_re),
    .cpu_we    (cpu_we),
    .cpu_rdata (cpu_rdata),
    .ram_re    (ram_re),
    .ram_we    (ram_we),
    .ram_rdata (ram_rdata),
    .io_re     (io_re),
    .io_we     (io_we),
    .io_rdata  (io_rdata)
  );

  qnice_ram #(.ADDR_W(ADDR_W)) u_ram (
    .clk   (clk),
    .re    (ram_re),
    .we    (ram_we),
    .addr  (cpu_addr[ADDR_W-1:0]),
    .wdata (cpu_wdata),
    .rdata (ram_rdata)
  );

  assign io_addr  = cpu_addr;
  assign io_wdata = cpu_wdata;

endmodule
