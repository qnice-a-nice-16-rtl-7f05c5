// qnice_regfile -- the sixteen visible QNICE registers and the register bank.
//
// R0..R7 are a window into a banked register memory of BANKS pages of eight
// 16-bit words; the page is chosen by rbank, the upper byte of R14. Changing
// rbank (for instance with ADD 0x0100, R14) therefore exposes a fresh set of
// R0..R7 in a single operation. R8..R13 are ordinary registers, R14 is the
// status register (bit 0 always reads 1) and R15 the program counter.
//
// One asynchronous read port, one synchronous write port. A separate flag
// port updates R14[7:0] after an ALU operation; a write of R14 through the
// main port in the same cycle wins, so that an instruction whose destination
// is R14 keeps its result. The bank memory is not reset (as a RAM would not
// be); R8..R13 and R15 reset to 0 and R14 to 0x0001.
// The banking scheme and register roles follow the architecture; the port
// structure, the flag-port priority and the reset values are this design's
// (the reset values match the register dump of a freshly started machine).
module qnice_regfile
  import qnice_pkg::*;
#(
  parameter int unsigned BANKS = 256   // pages of R0..R7, at most 256
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [3:0]  raddr_a,
  output logic [15:0] rdata_a,  // combinational
  input  logic        we,
  input  logic [3:0]  waddr,
  input  logic [15:0] wdata,
  input  logic        flags_we,
  input  flags_t      flags_in,
  output logic [15:0] sr,       // R14
  output logic [15:0] pc        // R15
);

  localparam int unsigned PAGE_W = (BANKS > 1) ? $clog2(BANKS) : 1;

  logic [15:0] bank [BANKS*8];
  logic [15:0] upper [8:13];
  logic [15:0] sr_q, pc_q;
  logic [PAGE_W-1:0] page;

  assign page = sr_q[8 +: PAGE_W];
  assign sr   = sr_q;
  assign pc   = pc_q;

  function automatic logic [15:0] read_reg(input logic [3:0] a);
    logic [15:0] v;
    if (!a[3])              v = bank[{page, a[2:0]}];
    else if (a == REG_SR)   v = sr_q;
    else if (a == REG_PC)   v = pc_q;
    else                    v = upper[a];
    return v;
  endfunction

  assign rdata_a = read_reg(raddr_a);

  always_ff @(posedge clk) begin
    if (we && !waddr[3]) bank[{page, waddr[2:0]}] <= wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 8; r <= 13; r++) upper[r] <= '0;
      sr_q <= 16'h0001;
      pc_q <= '0;
    end else begin
      if (we && waddr[3] && waddr != REG_SR && waddr != REG_PC) upper[waddr] <= wdata;
      if (we && waddr == REG_PC) pc_q <= wdata;
      if (we && waddr == REG_SR)  sr_q <= {wdata[15:1], 1'b1};
      else if (flags_we)          sr_q[7:0] <= {flags_in[7:1], 1'b1};
    end
  end

endmodule
