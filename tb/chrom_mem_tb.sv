// chrom_mem_tb: random writes and reads of 242-bit chromosomes against a copy
// kept by the testbench.
module chrom_mem_tb;
  import vrc_pkg::*;
  localparam int POP = 8;
  logic clk = 0, rst_n = 0, we = 0;
  logic [2:0] waddr = 0, raddr = 0;
  chrom_t wdata = '0, rdata;
  chrom_t copy [POP];
  int checks = 0, failures = 0;

  chrom_mem #(.POP(POP)) dut (.clk, .rst_n, .we, .waddr, .wdata, .raddr, .rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (copy[i]) copy[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      we = 1'($urandom_range(1));
      waddr = 3'($urandom_range(POP - 1));
      for (int b = 0; b < CFG_BITS; b++) wdata[b] = 1'($urandom_range(1));
      raddr = 3'($urandom_range(POP - 1));
      #1;
      checks++;
      if (rdata !== copy[raddr]) failures++;
      @(posedge clk);
      if (we) copy[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
