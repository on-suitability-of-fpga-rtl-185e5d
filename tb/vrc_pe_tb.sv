// vrc_pe_tb: drives an 8-source PE with random sources, selects and function
// codes and checks the registered output one cycle later; checks the
// synchronous clear.
module vrc_pe_tb;
  import vrc_pkg::*;
  import vrc_ref_pkg::*;

  logic clk = 0, rst_n = 0, clr = 0;
  data_t [7:0] src;
  logic [2:0] sel1, sel2;
  logic [3:0] func;
  data_t q;
  int checks = 0, failures = 0;

  vrc_pe #(.NSRC(8)) dut (.clk, .rst_n, .clr, .src, .sel1, .sel2, .func, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp;
    src = '0; sel1 = 0; sel2 = 0; func = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      for (int s = 0; s < 8; s++) src[s] = 8'($urandom_range(255));
      sel1 = 3'($urandom_range(7)); sel2 = 3'($urandom_range(7));
      func = 4'($urandom_range(15));
      clr  = ($urandom_range(9) == 0);
      exp  = clr ? 0 : fu_ref(int'(func), int'(src[sel1]), int'(src[sel2]));
      @(posedge clk); #1;
      checks++;
      if (int'(q) != exp) begin
        failures++;
        if (failures < 10) $display("FAIL i=%0d q=%0d exp=%0d", i, q, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
