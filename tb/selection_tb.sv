// selection_tb: models an error memory, runs the selection on random
// contents (many with ties) and checks the index and error of the minimum,
// the later entry winning a tie, and the POP + 1 cycle latency.
module selection_tb;
  localparam int POP = 8;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic [2:0] raddr, best_idx;
  logic [13:0] rdata, best_err;
  logic [13:0] mem [POP];
  int checks = 0, failures = 0;

  selection #(.POP(POP), .EW(14)) dut (.clk, .rst_n, .start, .raddr, .rdata,
                                       .busy, .done, .best_idx, .best_err);
  assign rdata = mem[raddr];

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ei, ee, cyc;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 500; k++) begin
      foreach (mem[i]) mem[i] = 14'((k % 2) ? $urandom_range(5) : $urandom_range(16383));
      ee = 1 << 20; ei = 0;
      foreach (mem[i]) if (int'(mem[i]) <= ee) begin ee = mem[i]; ei = i; end
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      cyc = 1;
      while (!done && cyc < 50) begin @(negedge clk); cyc++; end
      checks++;
      if (cyc != POP + 1) begin failures++; $display("FAIL latency %0d", cyc); end
      checks++;
      if (int'(best_idx) != ei || int'(best_err) != ee) begin
        failures++; $display("FAIL idx %0d/%0d err %0d/%0d", best_idx, ei, best_err, ee);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
