// tb_qnice_cpu -- self-checking test of the QNICE processor core.
//
// Part 1 runs the summation program (sum of 0x1000 down to 1) from a
// testbench memory and checks the final registers (R0 = 0x0800, R14 =
// 0x0009, R15 = 0x000A), the number of instructions (12291) and the cycle
// count of this implementation (6 cycles per MOVE/SUB with a constant, 5 per
// ADD and per ABRA, 3 for HALT).
// Part 2 executes random instruction streams and, after every instruction,
// compares the architectural state with the instruction-level reference
// model; memory and the whole register bank are compared at the end of each
// stream. The model's counters must show every opcode, addressing mode,
// taken and untaken jumps, calls and register-bank switches.
module tb_qnice_cpu;
  import qnice_pkg::*;
  import qnice_ref_pkg::*;

  logic        clk = 0, rst_n = 0;
  logic [15:0] mem_addr, mem_wdata, mem_rdata;
  logic        mem_re, mem_we, instr_done, halted;
  logic [15:0] mem [65536];
  int checks = 0, failures = 0;

  qnice_cpu dut (.clk(clk), .rst_n(rst_n), .mem_addr(mem_addr), .mem_wdata(mem_wdata),
                 .mem_re(mem_re), .mem_we(mem_we), .mem_rdata(mem_rdata),
                 .instr_done(instr_done), .halted(halted));

  always #5 clk = ~clk;

  always_ff @(posedge clk) begin
    if (mem_we) mem[mem_addr] <= mem_wdata;
    if (mem_re) mem_rdata <= mem[mem_addr];
  end

  qnice_model m;

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  function automatic logic [15:0] dut_reg(input int r);
    if (r < 8) return dut.u_rf.bank[{dut.u_rf.sr_q[15:8], 3'(r)}];
    if (r == 14) return dut.u_rf.sr_q;
    if (r == 15) return dut.u_rf.pc_q;
    return dut.u_rf.upper[r];
  endfunction

  task automatic compare_state(input string tag);
    logic ok = 1;
    for (int r = 0; r < 16; r++)
      if (dut_reg(r) !== m.rd(r)) begin
        ok = 0;
        if (failures < 20) $display("%s: R%0d dut=%h model=%h", tag, r, dut_reg(r), m.rd(r));
      end
    check(tag, ok);
  endtask

  initial begin
    #50ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cycles, instrs;
    logic [15:0] prog [10] = '{16'h0F80, 16'h0000, 16'h0F84, 16'h1000, 16'h1100,
                               16'h3F84, 16'h0001, 16'hFF8B, 16'h0004, 16'hE000};
    m = new();
    // ---------------- part 1: summation program ----------------
    foreach (mem[i]) mem[i] = 16'h0000;
    foreach (prog[i]) mem[i] = prog[i];
    for (int i = 0; i < 2048; i++) dut.u_rf.bank[i] = 16'h0000;
    repeat (3) @(negedge clk);
    rst_n = 1;
    cycles = 0; instrs = 0;
    while (!halted && cycles < 200000) begin
      @(posedge clk);
      if (instr_done) instrs++;
      #1;
      cycles++;
    end
    $display("summation: %0d instructions, %0d cycles", instrs, cycles);
    check("sum R0", dut_reg(0) == 16'h0800);
    check("sum R1", dut_reg(1) == 16'h0000);
    check("sum R13", dut_reg(13) == 16'h0000);
    check("sum R14", dut_reg(14) == 16'h0009);
    check("sum R15", dut_reg(15) == 16'h000A);
    check("sum instructions", instrs == 12291);
    check("sum cycles", cycles == 2*6 + 4096*(5+6+5) + 3);

    // ---------------- part 2: random streams vs. model ----------------
    for (int prg = 0; prg < 40; prg++) begin
      rst_n = 0;
      m.reset();
      for (int i = 0; i < 65536; i++) begin
        logic [15:0] w;
        w = 16'($urandom());
        if (w[15:12] == 4'hE && $urandom_range(0, 99) != 0) w[15:12] = 4'($urandom_range(0, 13));
        if (i < 256 && $urandom_range(0, 3) == 0) w[11:6] = {4'hF, 2'b10};  // constant source
        if (i < 256 && $urandom_range(0, 7) == 0) w[5:2] = 4'hE;           // write R14
        mem[i] = w;
        m.mem[i] = w;
      end
      for (int i = 0; i < 2048; i++) begin
        logic [15:0] v;
        v = 16'($urandom());
        dut.u_rf.bank[i] = v;
        m.bank[i] = v;
      end
      @(negedge clk);
      rst_n = 1;
      instrs = 0;
      cycles = 0;
      while (instrs < 400 && !m.halted && cycles < 20000) begin
        @(posedge clk);
        cycles++;
        if (instr_done) begin
          @(negedge clk);
          m.step();
          instrs++;
          compare_state($sformatf("prog %0d instr %0d", prg, instrs));
          check("halt agrees", halted == m.halted);
        end
      end
      begin
        int bad = 0;
        for (int i = 0; i < 65536; i++) if (mem[i] !== m.mem[i]) bad++;
        for (int i = 0; i < 2048; i++) if (dut.u_rf.bank[i] !== m.bank[i]) bad++;
        check($sformatf("prog %0d memory and bank", prg), bad == 0);
      end
    end
    // coverage of the mechanisms
    for (int o = 0; o < 16; o++) begin
      $display("opcode %h executed %0d times", o, m.op_count[o]);
      check($sformatf("opcode %h seen", o), m.op_count[o] > 0);
    end
    for (int md = 0; md < 4; md++) check("mode seen", m.mode_count[md] > 0);
    $display("jumps taken %0d, not taken %0d, calls %0d, bank switches %0d",
             m.taken_count, m.not_taken_count, m.call_count, m.bank_switch_count);
    check("taken", m.taken_count > 0);
    check("not taken", m.not_taken_count > 0);
    check("calls", m.call_count > 0);
    check("bank switches", m.bank_switch_count > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
