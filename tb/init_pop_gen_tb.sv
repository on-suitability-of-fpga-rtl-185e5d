// init_pop_gen_tb: feeds known random words and checks that the chromosome is
// their concatenation (first word in the lowest bits), that `done` comes
// 8 clock edges after the one that takes `start`, and that consecutive chromosomes differ.
module init_pop_gen_tb;
  import vrc_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic [31:0] rnd = 0;
  chrom_t chrom, prev;
  int checks = 0, failures = 0;

  init_pop_gen dut (.clk, .rst_n, .start, .rnd, .busy, .done, .chrom);

  always #5 clk = ~clk;
  always @(posedge clk) rnd <= $urandom;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [255:0] exp;
    int cyc;
    prev = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 50; k++) begin
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      cyc = 1;
      for (int w = 0; w < 8; w++) begin
        exp[32*w +: 32] = rnd;   // word taken at the coming edge
        @(negedge clk); cyc++;
      end
      checks++;
      if (!(done && !busy && cyc == 9)) begin failures++; $display("FAIL done timing"); end
      checks++;
      if (chrom !== exp[CFG_BITS-1:0]) begin failures++; $display("FAIL chrom"); end
      checks++;
      if (chrom == prev) failures++;
      prev = chrom;
      @(negedge clk);
      checks++;
      if (done) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
