// qnice_decoder -- splits a QNICE instruction word into its fields.
//
// Both instruction formats are decoded in parallel; opcode 0xF selects the
// jump/call interpretation of the low six bits. The classification bits tell
// the sequencer whether the destination operand is read (every two-operand
// instruction except MOVE, SWAP and NOT, whose result does not depend on the
// old destination) and whether a result is written back (not for CMP, which
// only sets flags, and not for the reserved opcode 0xD). HALT and the jumps
// have no destination operand. Field positions follow the architecture; the
// read/write classification is derived from the instruction list.
// Most outputs are instruction bits passed through unchanged; only the
// classification bits are logic. Purely combinational.
module qnice_decoder
  import qnice_pkg::*;
(
  input  logic [15:0] ir,
  output decoded_t    dec
);

  instr_t    f;
  br_instr_t b;

  always_comb begin
    f = instr_t'(ir);
    b = br_instr_t'(ir);

    dec           = '0;
    dec.op        = f.op;
    dec.src_reg   = f.src_reg;
    dec.src_mode  = f.src_mode;
    dec.dst_reg   = f.dst_reg;
    dec.dst_mode  = f.dst_mode;
    dec.br_mode   = b.br_mode;
    dec.negate    = b.negate;
    dec.cond      = b.cond;
    dec.is_branch = (f.op == OP_BRA);
    dec.is_halt   = (f.op == OP_HALT);

    unique case (f.op)
      OP_MOVE, OP_SWAP, OP_NOT: begin
        dec.dst_read  = 1'b0;
        dec.dst_write = 1'b1;
      end
      OP_CMP: begin
        dec.dst_read  = 1'b1;
        dec.dst_write = 1'b0;
      end
      OP_RSVD, OP_HALT, OP_BRA: begin
        dec.dst_read  = 1'b0;
        dec.dst_write = 1'b0;
      end
      default: begin
        dec.dst_read  = 1'b1;
        dec.dst_write = 1'b1;
      end
    endcase
  end

endmodule
