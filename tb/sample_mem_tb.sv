// sample_mem_tb: writes random samples at random addresses and checks both
// read ports against a copy kept by the testbench; checks the reset value.
module sample_mem_tb;
  import vrc_pkg::*;
  localparam int NS = 32;
  logic clk = 0, rst_n = 0, we = 0;
  logic [4:0] waddr = 0, raddr_a = 0, raddr_b = 0;
  sample_t wdata = '0, rdata_a, rdata_b;
  sample_t copy [NS];
  int checks = 0, failures = 0;

  sample_mem #(.NS(NS)) dut (.clk, .rst_n, .we, .waddr, .wdata, .raddr_a,
                             .rdata_a, .raddr_b, .rdata_b);

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
      waddr = 5'($urandom_range(NS - 1));
      wdata = sample_t'($urandom);
      raddr_a = 5'($urandom_range(NS - 1));
      raddr_b = 5'($urandom_range(NS - 1));
      #1;
      checks += 2;
      if (rdata_a !== copy[raddr_a]) failures++;
      if (rdata_b !== copy[raddr_b]) failures++;
      @(posedge clk);
      if (we) copy[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
