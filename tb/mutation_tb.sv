// mutation_tb: drives known random words and checks the offspring is the
// parent with exactly the drawn bit positions (rnd[15:0] mod 242) inverted,
// and that `done` comes MUT_BITS + 1 cycles after `start`.
module mutation_tb;
  import vrc_pkg::*;
  localparam int MB = 3;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic [31:0] rnd = 0;
  chrom_t parent = '0, child;
  int checks = 0, failures = 0;

  mutation #(.MUT_BITS(MB)) dut (.clk, .rst_n, .start, .parent, .rnd, .busy, .done, .child);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    chrom_t exp;
    int cyc, flips;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 300; k++) begin
      @(negedge clk);
      for (int b = 0; b < CFG_BITS; b++) parent[b] = 1'($urandom_range(1));
      start = 1; exp = parent;
      @(negedge clk) start = 0;
      cyc = 1;
      for (int j = 0; j < MB; j++) begin
        rnd = $urandom;
        exp[int'(rnd[15:0]) % CFG_BITS] ^= 1'b1;
        @(negedge clk); cyc++;
      end
      checks++;
      if (!(done && cyc == MB + 1)) begin failures++; $display("FAIL timing"); end
      checks++;
      if (child !== exp) begin failures++; $display("FAIL child"); end
      flips = $countones(child ^ parent);
      checks++;
      if (flips > MB || (flips % 2) != (MB % 2)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
