// qnice_addr_unit -- operand address computation for one QNICE operand.
//
// Given the value of the operand's register and its 2-bit addressing mode it
// returns the memory address to use and the value to write back to the
// register:
//   00 Rxx     register itself is the operand, no memory access
//   01 @Rxx    memory at Rxx
//   10 @Rxx++  memory at Rxx, then Rxx := Rxx + 1
//   11 @--Rxx  Rxx := Rxx - 1, then memory at the new Rxx
// The four modes are the architecture's; increments are by one word because
// memory is word addressed. Purely combinational.
module qnice_addr_unit
  import qnice_pkg::*;
(
  input  logic [15:0] reg_val,    // current contents of the operand register
  input  amode_e      mode,       // addressing mode field
  output logic        mem_access, // operand lives in memory
  output logic [15:0] addr,       // memory address of the operand
  output logic        reg_we,     // register must be updated
  output logic [15:0] reg_new     // updated register value
);

  always_comb begin
    mem_access = (mode != AM_REG);
    reg_we     = 1'b0;
    reg_new    = reg_val;
    addr       = reg_val;
    unique case (mode)
      AM_REG, AM_IND: ;
      AM_POSTINC: begin
        reg_we  = 1'b1;
        reg_new = reg_val + 16'd1;
      end
      AM_PREDEC: begin
        reg_we  = 1'b1;
        reg_new = reg_val - 16'd1;
        addr    = reg_val - 16'd1;
      end
    endcase
  end

endmodule
