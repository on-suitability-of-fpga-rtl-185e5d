// vrc_tb: the 25-PE VRC against the reference model.
//  1. A hand-built averaging circuit ((x0 + x1) >> 1 in PE 0, then passed
//     through one PE per column by X | 0): checks the result and that it
//     appears exactly 7 cycles after the inputs change.
//  2. Random chromosomes, loaded whole, with random inputs every cycle: the
//     output and every cycle's result must match the model.
//  3. Random single-PE words written through the configuration port.
//  4. The synchronous clear.
module vrc_tb;
  import vrc_pkg::*;
  import vrc_ref_pkg::*;

  logic clk = 0, rst_n = 0, clr = 0, cfg_load = 0, cfg_we = 0;
  chrom_t cfg_bits, cfg_out;
  logic [4:0] cfg_addr = 0;
  logic [9:0] cfg_wdata = 0;
  data_t [2:0] x;
  data_t y;
  int checks = 0, failures = 0;
  vrc_model m;

  vrc dut (.clk, .rst_n, .clr, .cfg_load, .cfg_bits, .cfg_we, .cfg_addr,
           .cfg_wdata, .cfg_out, .x, .y);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  // one cycle with inputs a, b, c, model advanced alongside
  task automatic cycle(int a, int b, int c);
    @(negedge clk);
    x = {8'(c), 8'(b), 8'(a)};
    @(posedge clk);
    m.step(a, b, c);
    #1;
    check(int'(y) == m.y(), $sformatf("y=%0d model=%0d", y, m.y()));
  endtask

  initial begin
    chrom_t c;
    int lat;
    m = new();
    x = '0;
    cfg_bits = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;

    // 1. averaging circuit and latency
    c = '0;
    c = set_pe(c, 0, 0, 1, 5);
    for (int col = 1; col <= 5; col++) c = set_pe(c, 4 * col, 0, 7, 2);
    c = set_pe(c, 24, 0, 7, 2);
    @(negedge clk); cfg_bits = c; cfg_load = 1;
    @(posedge clk); #1 cfg_load = 0; m.cfg = c;
    check(cfg_out == c, "cfg_out after load");
    for (int i = 0; i < 10; i++) cycle(0, 0, 0);
    @(negedge clk); x = {8'd77, 8'd100, 8'd50};
    lat = 0;
    do begin
      @(posedge clk); #1; lat++;
    end while (y == 0 && lat < 20);
    check(lat == LATENCY, $sformatf("latency %0d", lat));
    check(y == 8'd75, $sformatf("average %0d", y));
    m.step(50, 100, 77);  // keep the model in step is not needed: reload below

    // 2. random chromosomes
    for (int k = 0; k < 60; k++) begin
      for (int b = 0; b < CFG_BITS; b++) c[b] = 1'($urandom_range(1));
      @(negedge clk); cfg_bits = c; cfg_load = 1; clr = 1;
      @(posedge clk); #1 cfg_load = 0; clr = 0; m.cfg = c; m.clear();
      for (int t = 0; t < 40; t++)
        cycle($urandom_range(255), $urandom_range(255), $urandom_range(255));
    end

    // 3. single-PE words through the configuration port
    for (int k = 0; k < 200; k++) begin
      int p, w;
      @(negedge clk);
      p = $urandom_range(24);
      w = $urandom_range(1023);
      cfg_we = 1; cfg_addr = 5'(p); cfg_wdata = 10'(w);
      x = '0;
      @(posedge clk);
      m.step(0, 0, 0);
      for (int b = 0; b < ((p < 4) ? 8 : 10); b++) m.cfg[word_off(p) + b] = w[b];
      #1 cfg_we = 0;
      check(cfg_out == m.cfg, "word write");
      for (int t = 0; t < 3; t++)
        cycle($urandom_range(255), $urandom_range(255), $urandom_range(255));
    end

    // 4. clear
    @(negedge clk); clr = 1;
    @(posedge clk); #1 clr = 0;
    check(y == 0, "clear");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
