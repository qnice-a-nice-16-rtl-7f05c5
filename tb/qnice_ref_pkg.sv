// qnice_ref_pkg -- instruction-level reference model of the QNICE machine,
// used by the testbenches to predict what the RTL must do.
//
// The model executes one whole instruction per call of step(), directly
// from the architectural rules (instruction list, addressing modes, status
// flags, jumps and calls), with no notion of clock cycles. It keeps a flat
// 64K-word memory, the 256 x 8 banked registers and R8..R15. Its flag rules
// are the same choices as the RTL's: ADD/ADDC/SUB/SUBC/CMP set X C Z N V,
// MOVE/SWAP/NOT/AND/OR/XOR set X Z N, SHL sets C, SHR sets X; a result
// written to R14 replaces the flags; opcode 0xD only evaluates operands.
package qnice_ref_pkg;

  class qnice_model;
    bit [15:0] mem  [65536];
    bit [15:0] bank [2048];
    bit [15:0] hi   [8];       // R8..R15
    bit        halted;
    int unsigned n_instr;
    int unsigned op_count [16];
    int unsigned mode_count [4];
    int unsigned taken_count, not_taken_count, call_count, bank_switch_count;

    function new();
      reset();
    endfunction

    function void reset();
      foreach (hi[i]) hi[i] = 16'h0000;
      hi[6] = 16'h0001;
      halted = 1'b0;
      n_instr = 0;
    endfunction

    function bit [15:0] sr();  return hi[6]; endfunction
    function bit [15:0] pc();  return hi[7]; endfunction

    function bit [15:0] rd(int unsigned r);
      if (r < 8) return bank[{sr() >> 8, 3'b000} + r];
      return hi[r-8];
    endfunction

    function void wr(int unsigned r, bit [15:0] v);
      if (r < 8)       bank[{sr() >> 8, 3'b000} + r] = v;
      else if (r == 14) hi[6] = v | 16'h0001;
      else             hi[r-8] = v;
    endfunction

    // Evaluate one operand: returns its address (or register number) and
    // whether it lives in memory; applies ++/-- to the register.
    function void operand(int unsigned r, int unsigned mode,
                          output bit in_mem, output bit [15:0] ea);
      bit [15:0] v = rd(r);
      mode_count[mode]++;
      in_mem = (mode != 0);
      ea = v;
      case (mode)
        2: wr(r, v + 16'd1);
        3: begin ea = v - 16'd1; wr(r, ea); end
        default: ;
      endcase
    endfunction

    function void step();
      bit [15:0] ir, s, d, res, ea_s, ea_d;
      bit        ms, md, take;
      bit [7:0]  f;
      int unsigned op, cnt;
      bit [16:0] wide;
      if (halted) return;
      ir = mem[pc()];
      hi[7] = pc() + 16'd1;
      op = ir[15:12];
      op_count[op]++;
      n_instr++;
      if (op == 4'hE) begin
        halted = 1'b1;
        return;
      end
      operand(ir[11:8], ir[7:6], ms, ea_s);
      s = ms ? mem[ea_s] : rd(ir[11:8]);
      if (op == 4'hF) begin
        f = sr()[7:0];
        take = f[ir[2:0]] ^ ir[3];
        if (!take) begin not_taken_count++; return; end
        taken_count++;
        case (ir[5:4])
          2'b00: hi[7] = s;
          2'b10: hi[7] = pc() + s;
          default: begin
            call_count++;
            hi[5] = hi[5] - 16'd1;              // R13
            mem[hi[5]] = pc();
            hi[7] = (ir[5:4] == 2'b01) ? s : pc() + s;
          end
        endcase
        return;
      end
      operand(ir[5:2], ir[1:0], md, ea_d);
      d = md ? mem[ea_d] : rd(ir[5:2]);
      f = sr()[7:0];
      res = d;
      case (op)
        0: res = s;
        1, 2: begin
          wide = {1'b0, d} + {1'b0, s} + ((op == 2) ? f[2] : 1'b0);
          res = wide[15:0];
          f[2] = wide[16];
          f[5] = (d[15] == s[15]) && (res[15] != d[15]);
        end
        3, 4, 12: begin
          wide = {1'b0, d} - {1'b0, s} - ((op == 4) ? f[2] : 1'b0);
          res = wide[15:0];
          f[2] = wide[16];
          f[5] = (d[15] != s[15]) && (res[15] != d[15]);
        end
        5: begin            // bit by bit: shift left, fill with X, out to C
          cnt = s;
          for (int unsigned k = 0; k < cnt && k < 40; k++) begin
            f[2] = res[15];
            res = {res[14:0], f[1]};
          end
        end
        6: begin            // shift right, fill with C, out to X
          cnt = s;
          for (int unsigned k = 0; k < cnt && k < 40; k++) begin
            f[1] = res[0];
            res = {f[2], res[15:1]};
          end
        end
        7: res = {s[7:0], s[15:8]};
        8: res = ~s;
        9: res = s & d;
        10: res = s | d;
        11: res = s ^ d;
        default: ;
      endcase
      if (op <= 4 || (op >= 7 && op <= 12)) begin
        f[1] = (res == 16'hFFFF);
        f[3] = (res == 16'h0000);
        f[4] = res[15];
      end
      hi[6][7:0] = f | 8'h01;
      if (op != 12 && op != 13) begin
        if (md) mem[ea_d] = res;
        else begin
          if (ir[5:2] == 14 && res[15:8] != sr()[15:8]) bank_switch_count++;
          wr(ir[5:2], res);
        end
      end
    endfunction
  endclass

endpackage
