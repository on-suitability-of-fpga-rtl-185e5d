// rng_tb: checks the LFSR sequence against a bit-serial model of the same
// polynomial (x^32 + x^22 + x^2 + x + 1), the seed load, the zero-seed guard
// and that no value repeats within a stretch of the sequence.
module rng_tb;
  logic clk = 0, rst_n = 0, seed_we = 0;
  logic [31:0] seed = 0, rnd;
  int checks = 0, failures = 0;

  rng dut (.clk, .rst_n, .seed_we, .seed, .rnd);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Galois step written bit by bit: shift right, and when the bit shifted
  // out is 1, invert the taps 31, 21, 1 and 0.
  function automatic logic [31:0] next(logic [31:0] s);
    logic [31:0] n;
    logic o;
    o = s[0];
    for (int i = 0; i < 31; i++) n[i] = s[i+1];
    n[31] = 1'b0;
    if (o) begin
      n[31] = ~n[31]; n[21] = ~n[21]; n[1] = ~n[1]; n[0] = ~n[0];
    end
    return n;
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    logic [31:0] e;
    logic [31:0] seen [$];
    @(posedge clk); #1 check(rnd == 32'h1, "reset value");
    @(posedge clk);
    @(negedge clk) rst_n = 1;
    e = 32'h1;
    for (int i = 0; i < 1000; i++) begin
      @(posedge clk); #1; e = next(e);
      check(rnd == e, $sformatf("step %0d rnd=%h exp=%h", i, rnd, e));
    end
    @(negedge clk) begin seed_we = 1; seed = 32'hDEAD_BEEF; end
    @(posedge clk); #1 check(rnd == 32'hDEAD_BEEF, "seed");
    @(negedge clk) seed = 32'h0;
    @(posedge clk); #1 check(rnd == 32'h1, "zero seed");
    @(negedge clk) begin seed = 32'h1234_5678; end
    @(posedge clk); #1 seed_we = 0; e = 32'h1234_5678;
    for (int i = 0; i < 2000; i++) begin
      @(posedge clk); #1; e = next(e);
      check(rnd == e, "after seed");
      foreach (seen[j]) if (seen[j] == rnd) check(0, "repeat");
      if (i < 300) seen.push_back(rnd);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
