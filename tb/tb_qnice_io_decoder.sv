// tb_qnice_io_decoder -- self-checking test of the memory-mapped I/O
// decoder: addresses 0xFC00..0xFFFF must reach the I/O side, all others the
// RAM side, and read data must come from the side the previous read went to.
module tb_qnice_io_decoder;
  logic        clk = 0, rst_n = 0;
  logic [15:0] cpu_addr, cpu_rdata, ram_rdata, io_rdata;
  logic        cpu_re, cpu_we, ram_re, ram_we, io_re, io_we;
  int checks = 0, failures = 0, io_hits = 0, ram_hits = 0;

  qnice_io_decoder dut (.clk(clk), .rst_n(rst_n), .cpu_addr(cpu_addr),
                        .cpu_re(cpu_re), .cpu_we(cpu_we), .cpu_rdata(cpu_rdata),
                        .ram_re(ram_re), .ram_we(ram_we), .ram_rdata(ram_rdata),
                        .io_re(io_re), .io_we(io_we), .io_rdata(io_rdata));

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp_io;
    cpu_addr = 0; cpu_re = 0; cpu_we = 0;
    ram_rdata = 16'hAAAA; io_rdata = 16'h5555;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 4000; it++) begin
      @(negedge clk);
      cpu_addr = 16'($urandom());
      if (it % 3 == 0) cpu_addr = 16'hFC00 + 16'($urandom_range(0, 1023));
      if (it == 1) cpu_addr = 16'hFBFF;
      if (it == 2) cpu_addr = 16'hFC00;
      cpu_re = $urandom_range(0, 1);
      cpu_we = !cpu_re && $urandom_range(0, 1);
      exp_io = (cpu_addr >= 16'hFC00);
      #1;
      checks++;
      if (ram_re !== (cpu_re && !exp_io) || io_re !== (cpu_re && exp_io) ||
          ram_we !== (cpu_we && !exp_io) || io_we !== (cpu_we && exp_io)) begin
        failures++;
        $display("steering wrong at %h", cpu_addr);
      end
      if (cpu_re) begin
        if (exp_io) io_hits++; else ram_hits++;
        @(negedge clk);
        cpu_re = 0; cpu_we = 0;
        ram_rdata = 16'($urandom()); io_rdata = 16'($urandom());
        #1;
        checks++;
        if (cpu_rdata !== (exp_io ? io_rdata : ram_rdata)) begin
          failures++;
          $display("read data from wrong side (io=%b)", exp_io);
        end
      end
    end
    checks++;
    if (io_hits == 0 || ram_hits == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
