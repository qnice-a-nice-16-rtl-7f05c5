// tb_qnice_addr_unit -- self-checking test of the operand address unit:
// all four modes on edge and random register values.
module tb_qnice_addr_unit;
  import qnice_pkg::*;

  logic [15:0] reg_val, addr, reg_new;
  amode_e      mode;
  logic        mem_access, reg_we;
  int checks = 0, failures = 0;

  qnice_addr_unit dut (.reg_val(reg_val), .mode(mode), .mem_access(mem_access),
                       .addr(addr), .reg_we(reg_we), .reg_new(reg_new));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      logic [15:0] v;
      logic        e_mem, e_we;
      logic [15:0] e_addr, e_new;
      v = (i < 4) ? 16'(i * 16'h5555) : 16'($urandom());
      if (i == 4) v = 16'hFFFF;
      if (i == 5) v = 16'h0000;
      for (int m = 0; m < 4; m++) begin
        reg_val = v; mode = amode_e'(m);
        e_mem = (m != 0); e_we = (m >= 2);
        e_addr = (m == 3) ? v - 1 : v;
        e_new  = (m == 2) ? v + 1 : (m == 3) ? v - 1 : v;
        #1;
        checks++;
        if (mem_access !== e_mem || reg_we !== e_we || (e_mem && addr !== e_addr) ||
            (e_we && reg_new !== e_new)) begin
          failures++;
          $display("mode %0d v=%h: mem=%b addr=%h we=%b new=%h", m, v, mem_access, addr, reg_we, reg_new);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
