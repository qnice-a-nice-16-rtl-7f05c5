// tb_qnice_decoder -- self-checking test of the instruction decoder,
// including the encodings printed for the summation example
// (0x0F80 MOVE @R15++,R0; 0x1100 ADD R1,R0; 0xFF8B ABRA @R15++,!Z; 0xE000 HALT).
module tb_qnice_decoder;
  import qnice_pkg::*;

  logic [15:0] ir;
  decoded_t    dec;
  int checks = 0, failures = 0;

  qnice_decoder dut (.ir(ir), .dec(dec));

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s ir=%h", what, ir);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ir = 16'h0F80; #1;
    check("MOVE op", dec.op == OP_MOVE && dec.src_reg == 15 && dec.src_mode == AM_POSTINC &&
          dec.dst_reg == 0 && dec.dst_mode == AM_REG && dec.dst_write && !dec.dst_read);
    ir = 16'h1100; #1;
    check("ADD op", dec.op == OP_ADD && dec.src_reg == 1 && dec.dst_reg == 0 && dec.dst_read);
    ir = 16'hFF8B; #1;
    check("ABRA", dec.is_branch && dec.br_mode == BR_ABRA && dec.negate && dec.cond == 3'd3 &&
          dec.src_reg == 15 && dec.src_mode == AM_POSTINC && !dec.dst_write);
    ir = 16'hFF90; #1;
    check("ASUB", dec.is_branch && dec.br_mode == BR_ASUB && !dec.negate && dec.cond == 3'd0);
    ir = 16'hE000; #1;
    check("HALT", dec.is_halt && !dec.is_branch && !dec.dst_write);
    repeat (3000) begin
      logic [3:0] o;
      ir = 16'($urandom()); #1;
      o = ir[15:12];
      check("fields", dec.op == opcode_e'(o) && dec.src_reg == ir[11:8] && dec.src_mode == amode_e'(ir[7:6]) &&
            dec.dst_reg == ir[5:2] && dec.dst_mode == amode_e'(ir[1:0]) &&
            dec.br_mode == brmode_e'(ir[5:4]) && dec.negate == ir[3] && dec.cond == ir[2:0]);
      check("class", dec.is_branch == (o == 4'hF) && dec.is_halt == (o == 4'hE) &&
            dec.dst_write == (o <= 4'hB) &&
            dec.dst_read == ((o >= 4'h1 && o <= 4'h6) || (o >= 4'h9 && o <= 4'hC)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
