// vrc_cfg_mem_tb: checks whole-chromosome loads, single-PE word writes
// through the configuration port (that only the addressed PE's bits change,
// with the 8-bit words of the first column), the priority of load over a
// word write, and that out-of-range addresses change nothing.
module vrc_cfg_mem_tb;
  import vrc_pkg::*;
  import vrc_ref_pkg::*;

  logic clk = 0, rst_n = 0, load = 0, we = 0;
  chrom_t load_bits, cfg, exp;
  logic [4:0] waddr;
  logic [9:0] wdata;
  int checks = 0, failures = 0;

  vrc_cfg_mem dut (.clk, .rst_n, .load, .load_bits, .we, .waddr, .wdata, .cfg);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic chrom_t rand_chrom();
    chrom_t c;
    for (int b = 0; b < CFG_BITS; b++) c[b] = 1'($urandom_range(1));
    return c;
  endfunction

  task automatic compare(string what);
    checks++;
    if (cfg !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: cfg=%h exp=%h", what, cfg, exp);
    end
  endtask

  initial begin
    int p, w;
    load_bits = '0; waddr = 0; wdata = 0;
    exp = '0;
    @(posedge clk); #1 compare("reset");
    @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      load = ($urandom_range(7) == 0);
      we   = ($urandom_range(1) == 1);
      load_bits = rand_chrom();
      waddr = 5'($urandom_range(27));
      wdata = 10'($urandom_range(1023));
      if (load) exp = load_bits;
      else if (we && waddr < 25) begin
        p = int'(waddr);
        w = (p < 4) ? 8 : 10;
        for (int b = 0; b < w; b++) exp[word_off(p) + b] = wdata[b];
      end
      @(posedge clk); #1;
      compare("write");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
