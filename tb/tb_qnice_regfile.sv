// tb_qnice_regfile -- self-checking test of the banked register file.
// Random writes and reads against a shadow model of 256 pages x 8 lower
// registers and R8..R15; covers page switching through R14, the forced
// bit 0 of R14, the flag port and the priority of a direct R14 write.
module tb_qnice_regfile;
  import qnice_pkg::*;

  logic        clk = 0, rst_n = 0;
  logic [3:0]  raddr_a, waddr;
  logic [15:0] rdata_a, wdata, sr, pc;
  logic        we, flags_we;
  flags_t      flags_in;
  int checks = 0, failures = 0;
  int bank_switches = 0;

  logic [15:0] m_bank [2048];
  logic [15:0] m_hi [8:15];

  qnice_regfile dut (.clk(clk), .rst_n(rst_n), .raddr_a(raddr_a), .rdata_a(rdata_a),
                     .we(we), .waddr(waddr), .wdata(wdata), .flags_we(flags_we),
                     .flags_in(flags_in), .sr(sr), .pc(pc));

  always #5 clk = ~clk;

  function automatic logic [15:0] m_rd(input logic [3:0] a);
    if (a < 8) return m_bank[{m_hi[14][15:8], a[2:0]}];
    return m_hi[a];
  endfunction

  task automatic check_all();
    for (int r = 0; r < 16; r++) begin
      raddr_a = 4'(r);
      #1;
      checks++;
      if (rdata_a !== m_rd(4'(r))) begin
        failures++;
        if (failures < 10) $display("R%0d = %h, expected %h", r, rdata_a, m_rd(4'(r)));
      end
    end
    checks++;
    if (sr !== m_hi[14] || pc !== m_hi[15]) begin
      failures++;
      $display("sr/pc %h %h expected %h %h", sr, pc, m_hi[14], m_hi[15]);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; flags_we = 0; waddr = 0; wdata = 0; flags_in = '0; raddr_a = 0;
    for (int i = 0; i < 2048; i++) begin
      dut.bank[i] = 16'(i * 7);
      m_bank[i]   = 16'(i * 7);
    end
    for (int r = 8; r < 16; r++) m_hi[r] = 0;
    m_hi[14] = 16'h0001;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check_all();
    for (int it = 0; it < 3000; it++) begin
      we = $urandom_range(0, 3) != 0;
      waddr = 4'($urandom());
      if ($urandom_range(0, 7) == 0) waddr = REG_SR;
      wdata = 16'($urandom());
      flags_we = $urandom_range(0, 1);
      flags_in = flags_t'(8'($urandom()));
      @(posedge clk);
      // shadow update (old page for the bank write)
      if (we && waddr < 8) m_bank[{m_hi[14][15:8], waddr[2:0]}] = wdata;
      if (we && waddr == REG_SR) begin
        if (wdata[15:8] != m_hi[14][15:8]) bank_switches++;
        m_hi[14] = wdata | 16'h0001;
      end else begin
        if (flags_we) m_hi[14][7:0] = flags_in | 8'h01;
        if (we && waddr >= 8) m_hi[waddr] = wdata;
      end
      @(negedge clk);
      we = 0; flags_we = 0;
      check_all();
    end
    checks++;
    if (bank_switches < 10) begin failures++; $display("too few bank switches"); end
    $display("bank switches: %0d", bank_switches);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
