// tb_qnice_cond -- self-checking test of the branch condition unit:
// every status byte, condition select and negate bit.
module tb_qnice_cond;
  import qnice_pkg::*;

  flags_t     flags;
  logic       negate, take;
  logic [2:0] cond;
  int checks = 0, failures = 0;

  qnice_cond dut (.flags(flags), .negate(negate), .cond(cond), .take(take));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int f = 0; f < 256; f++)
      for (int c = 0; c < 8; c++)
        for (int n = 0; n < 2; n++) begin
          logic [7:0] fb;
          fb = 8'(f);
          flags = flags_t'(fb); cond = 3'(c); negate = n[0];
          #1;
          checks++;
          if (take !== (((fb >> c) & 8'd1) != 0) ^ n[0]) begin
            failures++;
            $display("flags=%h cond=%0d neg=%0d take=%b", fb, c, n, take);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
