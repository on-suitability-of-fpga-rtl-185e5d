// fitness_eval_tb: the fitness evaluation against a stand-in for the VRC, a
// 7-stage delay line computing in1 + OFS (cleared by vrc_clr). For random
// sample sets it checks the summed absolute error, the 1 + NS + 7 clock-edge
// duration, and that every sample's inputs are presented exactly once.
module fitness_eval_tb;
  import vrc_pkg::*;
  localparam int NS = 32;
  logic clk = 0, rst_n = 0, start = 0, busy, done, vrc_clr;
  logic [13:0] err;
  logic [4:0] smp_addr, tgt_addr;
  sample_t smp, tgt;
  data_t [2:0] x;
  data_t y;
  sample_t mem [NS];
  data_t pipe [LATENCY];
  int ofs;
  int checks = 0, failures = 0;

  fitness_eval #(.NS(NS), .EW(14)) dut (.clk, .rst_n, .start, .busy, .done, .err,
    .smp_addr, .smp, .tgt_addr, .tgt, .vrc_clr, .x, .y);

  assign smp = mem[smp_addr];
  assign tgt = mem[tgt_addr];
  assign y   = pipe[LATENCY-1];

  always #5 clk = ~clk;

  always_ff @(posedge clk) begin
    if (vrc_clr) foreach (pipe[i]) pipe[i] <= '0;
    else begin
      pipe[0] <= x[0] + 8'(ofs);
      for (int i = 1; i < LATENCY; i++) pipe[i] <= pipe[i-1];
    end
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp, cyc, seen, v;
    foreach (pipe[i]) pipe[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 100; k++) begin
      ofs = $urandom_range(3);
      foreach (mem[i]) begin
        mem[i] = sample_t'($urandom);
        if (k % 3 == 0) mem[i].target = 8'(mem[i].in1 + 8'(ofs));   // perfect
      end
      exp = 0;
      foreach (mem[i]) begin
        v = (int'(mem[i].in1) + ofs) % 256;
        exp += (v > int'(mem[i].target)) ? v - int'(mem[i].target) : int'(mem[i].target) - v;
      end
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      cyc = 1; seen = 0;
      while (!done && cyc < 200) begin
        if (x == {mem[smp_addr].in3, mem[smp_addr].in2, mem[smp_addr].in1} && x != 0) seen++;
        @(negedge clk); cyc++;
      end
      checks++;
      if (cyc != 2 + NS + LATENCY) begin failures++; $display("FAIL duration %0d", cyc); end
      checks++;
      if (int'(err) != exp) begin failures++; $display("FAIL err %0d exp %0d", err, exp); end
      checks++;
      if (seen != NS) begin failures++; $display("FAIL samples presented %0d", seen); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
