// tb_qnice_system -- end-to-end test of the complete QNICE machine at its
// default size (64K-word RAM, 256 register pages).
//
// 1. The summation program (sum of 0x1000 down to 1) runs from RAM; the
//    final R0 = 0x0800, R14 = 0x0009 (Z and the constant 1), R15 = 0x000A and
//    the instruction mix (2 MOVE, 4096 ADD, 4096 SUB, 4096 ABRA, 1 HALT)
//    and the operand accesses per addressing mode (register reads 12288,
//    @Rxx++ reads 8194, register writes 8194) are checked.
// 2. A directed program uses relative and absolute subroutine calls with
//    returns through the stack, register-bank switching inside the
//    subroutines, every addressing mode on both operands, all ALU
//    operations, taken and untaken conditional jumps, reads and writes in
//    the I/O window and HALT. Its final state is compared with the
//    instruction-level reference model.
// 3. Random instruction streams, including I/O-window accesses, are compared
//    with the model after every instruction.
// The I/O controllers are modelled here by a 1k-word scratch memory.
// Each mechanism's occurrences are counted; one that never occurs is a
// failure.
module tb_qnice_system;
  import qnice_pkg::*;
  import qnice_ref_pkg::*;

  logic        clk = 0, rst_n = 0;
  logic [15:0] io_addr, io_wdata, io_rdata;
  logic        io_re, io_we, instr_done, halted;
  logic [15:0] io_mem [1024];
  int checks = 0, failures = 0;
  int n_io_rd = 0, n_io_wr = 0, n_bank_sw = 0, n_halt = 0;
  logic [7:0] last_rbank;
  // operand accesses per addressing mode and executed opcodes, seen in the core
  int rd_mode [4], wr_mode [4], dut_ops [16];

  qnice_system dut (.clk(clk), .rst_n(rst_n), .io_addr(io_addr), .io_wdata(io_wdata),
                    .io_re(io_re), .io_we(io_we), .io_rdata(io_rdata),
                    .instr_done(instr_done), .halted(halted));

  always #5 clk = ~clk;

  // I/O device stand-in: 1k words, read data one cycle after io_re.
  always_ff @(posedge clk) begin
    if (io_we) io_mem[io_addr[9:0]] <= io_wdata;
    if (io_re) io_rdata <= io_mem[io_addr[9:0]];
  end

  always @(posedge clk) if (rst_n) begin
    if (io_re) n_io_rd++;
    if (io_we) n_io_wr++;
    if (dut.u_cpu.u_rf.sr_q[15:8] != last_rbank) n_bank_sw++;
    last_rbank <= dut.u_cpu.u_rf.sr_q[15:8];
    if (instr_done) dut_ops[dut.u_cpu.dec.op]++;
    case (int'(dut.u_cpu.state))
      2: if (!dut.u_cpu.dec.is_halt) rd_mode[dut.u_cpu.dec.src_mode]++;             // SRC
      4: if (dut.u_cpu.dec.dst_read) rd_mode[dut.u_cpu.dec.dst_mode]++;             // DST
      6: if (dut.u_cpu.dec.dst_write) wr_mode[dut.u_cpu.dec.dst_mode]++;            // EXEC
      default: ;
    endcase
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
    if (r < 8) return dut.u_cpu.u_rf.bank[{dut.u_cpu.u_rf.sr_q[15:8], 3'(r)}];
    if (r == 14) return dut.u_cpu.u_rf.sr_q;
    if (r == 15) return dut.u_cpu.u_rf.pc_q;
    return dut.u_cpu.u_rf.upper[r];
  endfunction

  function automatic logic [15:0] dut_mem(input int a);
    if (a >= 16'hFC00) return io_mem[a - 16'hFC00];
    return dut.u_ram.mem[a];
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

  task automatic compare_memory(input string tag);
    int bad = 0;
    for (int i = 0; i < 65536; i++) if (dut_mem(i) !== m.mem[i]) bad++;
    for (int i = 0; i < 2048; i++) if (dut.u_cpu.u_rf.bank[i] !== m.bank[i]) bad++;
    check(tag, bad == 0);
  endtask

  // Load the same image into the machine and the model; the bank memory is
  // given the same contents in both.
  task automatic load(input logic [15:0] img [$], input bit random_fill);
    m.reset();
    for (int i = 0; i < 65536; i++) begin
      logic [15:0] w;
      w = random_fill ? 16'($urandom()) : 16'h0000;
      if (random_fill && w[15:12] == 4'hE && $urandom_range(0, 99) != 0) w[15:12] = 4'h1;
      if (i < img.size()) w = img[i];
      m.mem[i] = w;
      if (i >= 16'hFC00) io_mem[i - 16'hFC00] = w;
      else dut.u_ram.mem[i] = w;
    end
    for (int i = 0; i < 2048; i++) begin
      logic [15:0] v;
      v = random_fill ? 16'($urandom()) : 16'h0000;
      dut.u_cpu.u_rf.bank[i] = v;
      m.bank[i] = v;
    end
  endtask

  // Run until HALT (or max_instr), stepping the model alongside.
  task automatic run(input string tag, input int max_instr, input bit lockstep,
                     output int instrs);
    int cycles = 0;
    instrs = 0;
    rst_n = 0;
    @(negedge clk);
    rst_n = 1;
    while (!m.halted && instrs < max_instr && cycles < 2000000) begin
      @(posedge clk);
      cycles++;
      if (instr_done) begin
        @(negedge clk);
        m.step();
        instrs++;
        if (lockstep) compare_state($sformatf("%s instr %0d", tag, instrs));
      end
    end
    if (halted) n_halt++;
    check({tag, ": halt agrees"}, halted == m.halted);
  endtask

  // --- tiny assembler ---
  logic [15:0] img [$];
  function automatic logic [15:0] I(input int op, input int sr, input int sm,
                                    input int dr, input int dm);
    return 16'((op << 12) | (sr << 8) | (sm << 6) | (dr << 2) | dm);
  endfunction
  function automatic logic [15:0] B(input int bm, input int sr, input int sm,
                                    input int neg, input int cnd);
    return 16'((15 << 12) | (sr << 8) | (sm << 6) | (bm << 4) | (neg << 3) | cnd);
  endfunction
  localparam int PC = 15, SR = 14, SP = 13;
  localparam int REG = 0, IND = 1, INC = 2, DEC = 3;
  task automatic at(input int addr);
    while (img.size() < addr) img.push_back(16'h0000);
  endtask
  task automatic e(input logic [15:0] w); img.push_back(w); endtask

  initial begin
    #200ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    m = new();
    last_rbank = 0;

    // ---------------- 1: summation ----------------
    img = '{16'h0F80, 16'h0000, 16'h0F84, 16'h1000, 16'h1100,
            16'h3F84, 16'h0001, 16'hFF8B, 16'h0004, 16'hE000};
    load(img, 0);
    foreach (rd_mode[i]) begin rd_mode[i] = 0; wr_mode[i] = 0; end
    foreach (dut_ops[i]) dut_ops[i] = 0;
    run("sum", 100000, 0, n);
    // operand statistics of the reference run: reads rx 12288, @rx++ 8194;
    // writes rx 8194; nothing else
    check("sum reads by mode", rd_mode[0] == 12288 && rd_mode[1] == 0 && rd_mode[2] == 8194 && rd_mode[3] == 0);
    check("sum writes by mode", wr_mode[0] == 8194 && wr_mode[1] == 0 && wr_mode[2] == 0 && wr_mode[3] == 0);
    check("sum mix in the core", dut_ops[0] == 2 && dut_ops[1] == 4096 && dut_ops[3] == 4096 &&
                                 dut_ops[15] == 4096 && dut_ops[14] == 1);
    $display("summation operand reads by mode %0d %0d %0d %0d, writes %0d %0d %0d %0d",
             rd_mode[0], rd_mode[1], rd_mode[2], rd_mode[3], wr_mode[0], wr_mode[1], wr_mode[2], wr_mode[3]);
    check("sum R0 = 0x0800", dut_reg(0) == 16'h0800);
    check("sum R14 = 0x0009", dut_reg(14) == 16'h0009);
    check("sum R15 = 0x000A", dut_reg(15) == 16'h000A);
    check("sum 12291 instructions", n == 12291);
    check("sum mix", m.op_count[0] == 2 && m.op_count[1] == 4096 && m.op_count[3] == 4096 &&
                     m.op_count[15] == 4096 && m.op_count[14] == 1);
    compare_state("sum final");
    $display("summation: %0d instructions, R0=%h SR=%h PC=%h", n, dut_reg(0), dut_reg(14), dut_reg(15));

    // ---------------- 2: directed program ----------------
    img.delete();
    e(I(0, PC, INC, SP, REG)); e(16'h4000);          // MOVE 0x4000, R13
    e(I(0, PC, INC, 8, REG));  e(16'h1111);          // MOVE 0x1111, R8
    e(I(0, PC, INC, 0, REG));  e(16'h00AA);          // MOVE 0x00AA, R0 (page 0)
    e(B(3, PC, INC, 0, 0));    e(16'h0100 - 16'(img.size() + 1)); // RSUB SUB1, 1
    e(B(1, PC, INC, 0, 0));    e(16'h0200);          // ASUB SUB2, 1
    e(I(0, PC, INC, 9, REG));  e(16'hFC10);          // MOVE 0xFC10, R9
    e(I(0, 8, REG, 9, INC));                         // MOVE R8, @R9++   (I/O write)
    e(I(0, PC, INC, 9, IND));  e(16'hABCD);          // MOVE 0xABCD, @R9 (I/O write)
    e(I(0, 9, DEC, 10, REG));                        // MOVE @--R9, R10  (I/O read)
    e(I(0, 9, IND, 11, REG));                        // MOVE @R9, R11
    e(I(1, 9, INC, 11, REG));                        // ADD @R9++, R11
    e(I(1, 9, IND, 11, REG));                        // ADD @R9, R11
    e(I(5, PC, INC, 11, REG)); e(16'h0003);          // SHL 3, R11
    e(I(6, PC, INC, 11, REG)); e(16'h0002);          // SHR 2, R11
    e(I(7, 11, REG, 12, REG));                       // SWAP R11, R12
    e(I(8, 12, REG, 12, REG));                       // NOT R12, R12
    e(I(9, PC, INC, 12, REG)); e(16'h0FF0);          // AND 0x0FF0, R12
    e(I(10, PC, INC, 12, REG)); e(16'h8001);         // OR 0x8001, R12
    e(I(11, 8, REG, 12, REG));                       // XOR R8, R12
    e(I(0, PC, INC, 1, REG)); e(16'h5000);           // MOVE 0x5000, R1
    e(I(0, 12, REG, 1, DEC));                        // MOVE R12, @--R1
    e(I(2, PC, INC, 1, IND)); e(16'hFFFF);           // ADDC 0xFFFF, @R1
    e(I(4, 8, REG, 1, INC));                         // SUBC R8, @R1++
    e(I(3, PC, INC, 1, REG)); e(16'h0001);           // SUB 1, R1
    e(I(12, PC, INC, 8, REG)); e(16'h1234);          // CMP 0x1234, R8
    e(B(0, PC, INC, 0, 3));   e(16'h0300);           // ABRA 0x0300, Z  (not taken)
    e(B(2, PC, INC, 1, 3));   e(16'h0001);           // RBRA +1, !Z     (taken)
    e(16'hE000);                                     // HALT (skipped)
    e(I(0, 0, REG, 2, REG));                         // MOVE R0, R2
    e(16'hE000);                                     // HALT
    at(16'h0100);                                    // SUB1
    e(I(1, PC, INC, SR, REG)); e(16'h0100);          // ADD 0x0100, R14
    e(I(0, PC, INC, 0, REG)); e(16'h5555);           // MOVE 0x5555, R0
    e(I(1, 8, REG, 0, REG));                         // ADD R8, R0
    e(I(0, 0, REG, 8, REG));                         // MOVE R0, R8
    e(I(3, PC, INC, SR, REG)); e(16'h0100);          // SUB 0x0100, R14
    e(I(0, SP, INC, PC, REG));                       // MOVE @R13++, R15
    at(16'h0200);                                    // SUB2
    e(I(1, PC, INC, SR, REG)); e(16'h0200);          // ADD 0x0200, R14
    e(I(0, 8, REG, 3, REG));                         // MOVE R8, R3
    e(I(10, PC, INC, 3, REG)); e(16'h000F);          // OR 0x000F, R3
    e(I(0, 3, REG, 8, REG));                         // MOVE R3, R8
    e(I(3, PC, INC, SR, REG)); e(16'h0200);          // SUB 0x0200, R14
    e(I(0, SP, INC, PC, REG));                       // MOVE @R13++, R15
    at(16'h0300);
    e(16'hE000);
    load(img, 0);
    run("directed", 1000, 1, n);
    compare_memory("directed memory");
    check("directed: R0 of page 0 kept across calls", dut_reg(0) == 16'h00AA);
    check("directed: stack pointer restored", dut_reg(SP) == 16'h4000);
    check("directed: subroutines combined R8", dut_reg(8) == ((16'h5555 + 16'h1111) | 16'h000F));
    check("directed: I/O word written", io_mem[16'h10] == dut_reg(8));
    check("directed: stopped at the final HALT, not at 0x0300", halted && dut_reg(PC) < 16'h0100);
    $display("directed: %0d instructions, R8=%h R10=%h R12=%h", n, dut_reg(8), dut_reg(10), dut_reg(12));

    // ---------------- 3: random streams ----------------
    for (int p = 0; p < 20; p++) begin
      img.delete();
      for (int i = 0; i < 64; i++) begin
        logic [15:0] w;
        w = 16'($urandom());
        if (w[15:12] == 4'hE) w[15:12] = 4'hC;
        if ($urandom_range(0, 3) == 0) w[11:6] = {4'hF, 2'b10};
        if ($urandom_range(0, 5) == 0) begin                 // point R9 into the I/O window
          img.push_back(I(0, PC, INC, 9, REG));
          img.push_back(16'hFC00 + 16'($urandom_range(0, 1023)));
          w[5:0] = {4'd9, 2'($urandom_range(1, 3))};
        end
        img.push_back(w);
      end
      load(img, 1);
      run($sformatf("random %0d", p), 300, 1, n);
      compare_memory($sformatf("random %0d memory", p));
    end

    // ---------------- mechanism counts ----------------
    $display("I/O reads %0d, I/O writes %0d, bank switches %0d, halts %0d",
             n_io_rd, n_io_wr, n_bank_sw, n_halt);
    $display("jumps taken %0d, not taken %0d, calls %0d", m.taken_count, m.not_taken_count, m.call_count);
    for (int md = 0; md < 4; md++) $display("addressing mode %0d used %0d times", md, m.mode_count[md]);
    check("I/O reads happened", n_io_rd > 0);
    check("I/O writes happened", n_io_wr > 0);
    check("bank switches happened", n_bank_sw > 0);
    check("halt happened", n_halt > 0);
    check("taken jumps happened", m.taken_count > 0);
    check("untaken jumps happened", m.not_taken_count > 0);
    check("calls happened", m.call_count > 0);
    for (int md = 0; md < 4; md++) check("addressing mode used", m.mode_count[md] > 0);
    for (int o = 0; o < 16; o++) check($sformatf("opcode %h executed", o), m.op_count[o] > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
