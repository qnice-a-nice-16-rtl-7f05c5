// tb_qnice_alu -- self-checking test of the QNICE ALU.
// Directed corner cases plus random operands for every opcode; expected
// results are computed here bit by bit (shifts one place at a time).
module tb_qnice_alu;
  import qnice_pkg::*;

  opcode_e     op;
  logic [15:0] src, dst, result;
  flags_t      fin, fout;
  int checks = 0, failures = 0;

  qnice_alu dut (.op(op), .src(src), .dst(dst), .flags_in(fin), .result(result), .flags_out(fout));

  task automatic expect_op(input opcode_e o, input logic [15:0] s, input logic [15:0] d,
                           input logic [7:0] fi);
    logic [15:0] r;
    logic [7:0]  f;
    logic [16:0] w;
    logic        wr_flags;
    r = d; f = fi; wr_flags = 1'b0;
    case (o)
      OP_MOVE: begin r = s; wr_flags = 1; end
      OP_ADD, OP_ADDC: begin
        w = d + s + ((o == OP_ADDC) ? fi[SR_C] : 0);
        r = w[15:0]; f[SR_C] = w[16];
        f[SR_V] = (int'($signed(d)) + int'($signed(s)) + int'((o == OP_ADDC) ? fi[SR_C] : 1'b0))
                  != int'($signed(r));
        wr_flags = 1;
      end
      OP_SUB, OP_SUBC, OP_CMP: begin
        w = {1'b0, d} - {1'b0, s} - ((o == OP_SUBC) ? fi[SR_C] : 0);
        r = w[15:0]; f[SR_C] = (int'(d) - int'(s) - int'((o == OP_SUBC) ? fi[SR_C] : 1'b0)) < 0;
        f[SR_V] = (int'($signed(d)) - int'($signed(s)) - int'((o == OP_SUBC) ? fi[SR_C] : 1'b0))
                  != int'($signed(r));
        wr_flags = 1;
      end
      OP_SHL: for (int k = 0; k < int'(s) && k < 20; k++) begin f[SR_C] = r[15]; r = {r[14:0], f[SR_X]}; end
      OP_SHR: for (int k = 0; k < int'(s) && k < 20; k++) begin f[SR_X] = r[0]; r = {f[SR_C], r[15:1]}; end
      OP_SWAP: begin r = {s[7:0], s[15:8]}; wr_flags = 1; end
      OP_NOT:  begin r = ~s; wr_flags = 1; end
      OP_AND:  begin r = s & d; wr_flags = 1; end
      OP_OR:   begin r = s | d; wr_flags = 1; end
      OP_XOR:  begin r = s ^ d; wr_flags = 1; end
      default: ;
    endcase
    if (wr_flags) begin
      f[SR_X] = (r == 16'hFFFF); f[SR_Z] = (r == 0); f[SR_N] = r[15];
    end
    f[SR_ONE] = 1'b1;
    op = o; src = s; dst = d; fin = flags_t'(fi);
    #1;
    checks++;
    if ((o != OP_CMP && o != OP_RSVD && result !== r) || fout !== flags_t'(f)) begin
      failures++;
      if (failures < 10)
        $display("ALU mismatch op=%0h src=%h dst=%h fin=%h: got %h/%h exp %h/%h",
                 o, s, d, fi, result, fout, r, f);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // directed corners
    expect_op(OP_ADD,  16'h0001, 16'hFFFF, 8'h01);  // carry out, zero
    expect_op(OP_ADD,  16'h0001, 16'h7FFF, 8'h01);  // signed overflow
    expect_op(OP_ADDC, 16'h0000, 16'hFFFF, 8'h05);  // carry in
    expect_op(OP_SUB,  16'h0001, 16'h0001, 8'h01);  // zero, no borrow
    expect_op(OP_SUB,  16'h0002, 16'h0001, 8'h01);  // borrow, result 0xFFFF
    expect_op(OP_SUB,  16'h0001, 16'h8000, 8'h01);  // signed overflow
    expect_op(OP_SUBC, 16'h0000, 16'h0000, 8'h05);
    expect_op(OP_CMP,  16'h1234, 16'h1234, 8'h01);
    expect_op(OP_SHL,  16'h0001, 16'h8001, 8'h03);  // fill with X, out to C
    expect_op(OP_SHL,  16'h0010, 16'h0001, 8'h01);
    expect_op(OP_SHL,  16'h0011, 16'h0001, 8'h03);
    expect_op(OP_SHL,  16'h0000, 16'h1234, 8'h05);
    expect_op(OP_SHR,  16'h0001, 16'h0003, 8'h05);  // fill with C, out to X
    expect_op(OP_SHR,  16'h0010, 16'h8000, 8'h01);
    expect_op(OP_SHR,  16'hFFFF, 16'h8000, 8'h05);
    expect_op(OP_SWAP, 16'h12AB, 16'h0000, 8'h01);
    expect_op(OP_NOT,  16'h0000, 16'h5555, 8'h01);
    expect_op(OP_RSVD, 16'h1111, 16'h2222, 8'hFF);
    // random
    repeat (6000) begin
      logic [15:0] s;
      s = $urandom();
      if ($urandom_range(0, 1)) s = s & 16'h001F;
      expect_op(opcode_e'($urandom_range(0, 13)), s, 16'($urandom()), 8'($urandom()));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
