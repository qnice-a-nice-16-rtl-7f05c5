// tb_qnice_ram -- self-checking test of the main memory: random writes and
// reads against a shadow array, with read data checked one cycle after the
// request and held while no read is issued.
module tb_qnice_ram;
  logic        clk = 0, re, we;
  logic [15:0] addr, wdata, rdata;
  logic [15:0] shadow [65536];
  bit          known [65536];
  int checks = 0, failures = 0;

  qnice_ram dut (.clk(clk), .re(re), .we(we), .addr(addr), .wdata(wdata), .rdata(rdata));

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] exp_data;
    re = 0; we = 0; addr = 0; wdata = 0;
    for (int it = 0; it < 6000; it++) begin
      @(negedge clk);
      addr = (it < 3000) ? 16'($urandom_range(0, 63)) : 16'($urandom());
      if (it % 97 == 0) addr = 16'hFFFF;
      if ($urandom_range(0, 1) || !known[addr]) begin
        we = 1; re = 0; wdata = 16'($urandom());
        shadow[addr] = wdata; known[addr] = 1;
      end else begin
        we = 0; re = 1; exp_data = shadow[addr];
        @(negedge clk);
        re = 0; we = 0;
        checks++;
        if (rdata !== exp_data) begin
          failures++;
          $display("read %h: %h expected %h", addr, rdata, exp_data);
        end
        addr = ~addr;   // no read this cycle: data must hold
        @(negedge clk);
        checks++;
        if (rdata !== exp_data) begin failures++; $display("read data not held"); end
      end
    end
    @(negedge clk); we = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
