// qnice_alu -- result and status flags of the QNICE two-operand instructions.
//
// Computes, for opcodes 0x0..0xD, the value written to the destination and the
// new lower byte of the status register R14:
//   MOVE  dst := src                 SWAP  dst := bytes of src exchanged
//   ADD   dst := dst + src           NOT   dst := ~src
//   ADDC  dst := dst + src + C       AND/OR/XOR  dst := src op dst
//   SUB   dst := dst - src           CMP   flags of dst - src, nothing written
//   SUBC  dst := dst - src - C
//   SHL   dst << src, vacated bits filled with X, last bit out goes to C
//   SHR   dst >> src, vacated bits filled with C, last bit out goes to X
// The operations are the architecture's. Which instructions touch which flags
// is this design's choice, as the architecture only defines the flags
// themselves: the arithmetic group (ADD, ADDC, SUB, SUBC, CMP) sets X, C, Z,
// N and V; MOVE, SWAP, NOT, AND, OR and XOR set X, Z and N; SHL sets only C
// and SHR only X. C after a subtraction is the borrow. I and M are never
// changed here and bit 0 is always 1. The reserved opcode 0xD changes
// nothing. A shift count of 16 or more shifts every bit out.
// Purely combinational.
module qnice_alu
  import qnice_pkg::*;
(
  input  opcode_e     op,
  input  logic [15:0] src,
  input  logic [15:0] dst,
  input  flags_t      flags_in,
  output logic [15:0] result,
  output flags_t      flags_out
);

  logic [16:0] sum;
  logic        cin;
  logic        fill;
  logic [15:0] fill_mask;
  logic [4:0]  sh;        // shift count saturated to 16
  logic        shout;     // last bit shifted out

  always_comb begin
    result    = dst;
    flags_out = flags_in;
    sum       = '0;
    cin       = 1'b0;
    fill      = 1'b0;
    fill_mask = '0;
    shout     = 1'b0;
    sh        = (src > 16'd16) ? 5'd16 : src[4:0];

    unique case (op)
      OP_ADD, OP_ADDC: begin
        cin    = (op == OP_ADDC) ? flags_in.c : 1'b0;
        sum    = {1'b0, dst} + {1'b0, src} + {16'd0, cin};
        result = sum[15:0];
        flags_out.c = sum[16];
        flags_out.v = (dst[15] == src[15]) && (sum[15] != dst[15]);
      end
      OP_SUB, OP_SUBC, OP_CMP: begin
        cin    = (op == OP_SUBC) ? flags_in.c : 1'b0;
        sum    = {1'b0, dst} - {1'b0, src} - {16'd0, cin};
        result = sum[15:0];
        flags_out.c = sum[16];
        flags_out.v = (dst[15] != src[15]) && (sum[15] != dst[15]);
      end
      OP_MOVE: result = src;
      OP_SWAP: result = {src[7:0], src[15:8]};
      OP_NOT:  result = ~src;
      OP_AND:  result = src & dst;
      OP_OR:   result = src | dst;
      OP_XOR:  result = src ^ dst;
      OP_SHL: begin
        fill      = flags_in.x;
        fill_mask = ~(16'hFFFF << sh);
        result    = (dst << sh) | (fill ? fill_mask : 16'h0000);
        if (src > 16'd16)      shout = fill;
        else if (sh != 5'd0)   shout = dst[4'(5'd16 - sh)];
        if (src != 16'd0) flags_out.c = shout;
      end
      OP_SHR: begin
        fill      = flags_in.c;
        fill_mask = ~(16'hFFFF >> sh);
        result    = (dst >> sh) | (fill ? fill_mask : 16'h0000);
        if (src > 16'd16)      shout = fill;
        else if (sh != 5'd0)   shout = dst[4'(sh - 5'd1)];
        if (src != 16'd0) flags_out.x = shout;
      end
      default: ;  // reserved opcode, HALT and jumps: no ALU result
    endcase

    unique case (op)
      OP_ADD, OP_ADDC, OP_SUB, OP_SUBC, OP_CMP,
      OP_MOVE, OP_SWAP, OP_NOT, OP_AND, OP_OR, OP_XOR: begin
        flags_out.x = (result == 16'hFFFF);
        flags_out.z = (result == 16'h0000);
        flags_out.n = result[15];
      end
      default: ;
    endcase
    flags_out.one = 1'b1;
  end

endmodule
