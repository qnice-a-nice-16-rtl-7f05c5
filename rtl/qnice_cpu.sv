// qnice_cpu -- the QNICE processor core.
//
// A multi-cycle sequencer that executes one instruction at a time and makes
// at most one memory access and one register write per clock:
//   FETCH   read the word at R15, R15 := R15 + 1
//   DECODE  latch the instruction word
//   SRC     evaluate the source operand through the addressing unit (a read
//           for the memory modes, plus the ++/-- register update); HALT stops
//           here
//   SRC_W   capture the source word from memory
//   DST     same for the destination; its address is kept for write-back and
//           memory is read only if the instruction uses the old value
//   DST_W   capture the destination word
//   EXEC    ALU, status flags and write-back to register or memory
//   BRANCH  jumps/calls: test the condition; ABRA/RBRA load R15
//   PUSH    calls: R13 := R13 - 1, mem[R13] := R15 (the return address)
//   JUMP    calls: R15 := target
// A register-to-register instruction takes 5 cycles, each memory operand one
// more, a taken call 7 or more. Because R15 has already been advanced when
// an operand is evaluated, "@R15++" reads the word after the instruction,
// which is how constants are encoded, and a relative jump adds its operand
// to the address of the next instruction.
//
// Bus: mem_addr/mem_wdata/mem_re/mem_we are valid in the cycle of the
// request; read data must arrive on mem_rdata in the following cycle; writes
// complete at the clock edge. No wait states. instr_done pulses for one
// cycle when an instruction finishes; halted stays high after HALT until
// reset.
//
// The instruction semantics, addressing modes, the use of R13 as the call
// stack pointer and the push-then-jump order of calls follow the
// architecture. The state sequence, the cycle counts, the bus timing and the
// evaluation order (source operand before destination, both before the
// branch condition is tested) are this design's choices.
module qnice_cpu
  import qnice_pkg::*;
#(
  parameter int unsigned BANKS = 256
) (
  input  logic        clk,
  input  logic        rst_n,
  output logic [15:0] mem_addr,
  output logic [15:0] mem_wdata,
  output logic        mem_re,
  output logic        mem_we,
  input  logic [15:0] mem_rdata,
  output logic        instr_done,
  output logic        halted
);

  typedef enum logic [3:0] {
    S_FETCH, S_DECODE, S_SRC, S_SRC_W, S_DST, S_DST_W,
    S_EXEC, S_BRANCH, S_PUSH, S_JUMP, S_HALT
  } state_e;

  state_e      state, state_n;
  logic [15:0] ir;
  logic [15:0] src_val, dst_val, dst_addr, target;
  decoded_t    dec;

  // register file ports
  logic [3:0]  ra_addr;
  logic [15:0] ra_data;
  logic        rf_we;
  logic [3:0]  rf_waddr;
  logic [15:0] rf_wdata;
  logic        flags_we;
  flags_t      flags_new;
  logic [15:0] sr, pc;

  // operand addressing
  amode_e      op_mode;
  logic        op_mem;
  logic [15:0] op_addr;
  logic        op_reg_we;
  logic [15:0] op_reg_new;

  logic [15:0] alu_result;
  logic        br_take;

  qnice_decoder u_dec (
    .ir  (ir),
    .dec (dec)
  );

  qnice_regfile #(.BANKS(BANKS)) u_rf (
    .clk      (clk),
    .rst_n    (rst_n),
    .raddr_a  (ra_addr),
    .rdata_a  (ra_data),
    .we       (rf_we),
    .waddr    (rf_waddr),
    .wdata    (rf_wdata),
    .flags_we (flags_we),
    .flags_in (flags_new),
    .sr       (sr),
    .pc       (pc)
  );

  qnice_addr_unit u_au (
    .reg_val    (ra_data),
    .mode       (op_mode),
    .mem_access (op_mem),
    .addr       (op_addr),
    .reg_we     (op_reg_we),
    .reg_new    (op_reg_new)
  );

  qnice_alu u_alu (
    .op        (dec.op),
    .src       (src_val),
    .dst       (dst_val),
    .flags_in  (flags_t'(sr[7:0])),
    .result    (alu_result),
    .flags_out (flags_new)
  );

  qnice_cond u_cond (
    .flags  (flags_t'(sr[7:0])),
    .negate (dec.negate),
    .cond   (dec.cond),
    .take   (br_take)
  );

  // Which register the addressing unit looks at, and in which mode.
  always_comb begin
    ra_addr = REG_SP;
    op_mode = AM_REG;
    unique case (state)
      S_SRC: begin ra_addr = dec.src_reg; op_mode = dec.src_mode; end
      S_DST: begin ra_addr = dec.dst_reg; op_mode = dec.dst_mode; end
      default: ;
    endcase
  end

  always_comb begin
    state_n    = state;
    mem_addr   = pc;
    mem_wdata  = alu_result;
    mem_re     = 1'b0;
    mem_we     = 1'b0;
    rf_we      = 1'b0;
    rf_waddr   = REG_PC;
    rf_wdata   = pc + 16'd1;
    flags_we   = 1'b0;
    instr_done = 1'b0;

    unique case (state)
      S_FETCH: begin
        mem_re  = 1'b1;
        rf_we   = 1'b1;           // R15 := R15 + 1
        state_n = S_DECODE;
      end
      S_DECODE: state_n = S_SRC;
      S_SRC: begin
        if (dec.is_halt) begin
          instr_done = 1'b1;
          state_n    = S_HALT;
        end else begin
          mem_addr = op_addr;
          mem_re   = op_mem;
          rf_we    = op_reg_we;
          rf_waddr = dec.src_reg;
          rf_wdata = op_reg_new;
          if (op_mem)              state_n = S_SRC_W;
          else if (dec.is_branch)  state_n = S_BRANCH;
          else                     state_n = S_DST;
        end
      end
      S_SRC_W: state_n = dec.is_branch ? S_BRANCH : S_DST;
      S_DST: begin
        mem_addr = op_addr;
        mem_re   = op_mem && dec.dst_read;
        rf_we    = op_reg_we;
        rf_waddr = dec.dst_reg;
        rf_wdata = op_reg_new;
        state_n  = (op_mem && dec.dst_read) ? S_DST_W : S_EXEC;
      end
      S_DST_W: state_n = S_EXEC;
      S_EXEC: begin
        flags_we   = 1'b1;
        instr_done = 1'b1;
        state_n    = S_FETCH;
        if (dec.dst_write) begin
          if (dec.dst_mode == AM_REG) begin
            rf_we    = 1'b1;
            rf_waddr = dec.dst_reg;
            rf_wdata = alu_result;
          end else begin
            mem_addr = dst_addr;
            mem_we   = 1'b1;
          end
        end
      end
      S_BRANCH: begin
        state_n = S_FETCH;
        if (!br_take) begin
          instr_done = 1'b1;
        end else begin
          unique case (dec.br_mode)
            BR_ABRA: begin
              rf_we = 1'b1; rf_wdata = src_val; instr_done = 1'b1;
            end
            BR_RBRA: begin
              rf_we = 1'b1; rf_wdata = pc + src_val; instr_done = 1'b1;
            end
            BR_ASUB, BR_RSUB: state_n = S_PUSH;
          endcase
        end
      end
      S_PUSH: begin                 // ra_addr selects R13 here
        mem_addr  = ra_data - 16'd1;
        mem_wdata = pc;
        mem_we    = 1'b1;
        rf_we     = 1'b1;
        rf_waddr  = REG_SP;
        rf_wdata  = ra_data - 16'd1;
        state_n   = S_JUMP;
      end
      S_JUMP: begin
        rf_we      = 1'b1;
        rf_wdata   = target;
        instr_done = 1'b1;
        state_n    = S_FETCH;
      end
      S_HALT: ;
      default: state_n = S_FETCH;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_FETCH;
      ir       <= '0;
      src_val  <= '0;
      dst_val  <= '0;
      dst_addr <= '0;
      target   <= '0;
    end else begin
      state <= state_n;
      unique case (state)
        S_DECODE: ir <= mem_rdata;
        S_SRC:    if (!op_mem) src_val <= ra_data;
        S_SRC_W:  src_val <= mem_rdata;
        S_DST: begin
          dst_addr <= op_addr;
          if (!op_mem) dst_val <= ra_data;
        end
        S_DST_W:  dst_val <= mem_rdata;
        S_BRANCH: target <= (dec.br_mode == BR_ASUB) ? src_val : pc + src_val;
        default: ;
      endcase
    end
  end

  assign halted = (state == S_HALT);

  // A cycle never both reads and writes memory.
  a_one_access: assert property (@(posedge clk) disable iff (!rst_n) !(mem_re && mem_we));

endmodule
