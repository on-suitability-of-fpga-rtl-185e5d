// vrc_fu_tb: checks every function code of the PE function unit against the
// function table, on random and corner operands.
module vrc_fu_tb;
  import vrc_pkg::*;
  import vrc_ref_pkg::*;

  logic [3:0] func;
  data_t x, y, z;
  int checks = 0, failures = 0;

  vrc_fu dut (.func, .x, .y, .z);

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic try(int f, int a, int b);
    func = 4'(f); x = 8'(a); y = 8'(b);
    #1;
    checks++;
    if (int'(z) != fu_ref(f, a, b)) begin
      failures++;
      if (failures < 10) $display("FAIL f=%0d x=%0d y=%0d z=%0d exp=%0d", f, a, b, z, fu_ref(f, a, b));
    end
  endtask

  initial begin
    for (int f = 0; f < 16; f++) begin
      try(f, 0, 0); try(f, 255, 255); try(f, 255, 1); try(f, 1, 255);
      try(f, 128, 128); try(f, 200, 100);
      for (int i = 0; i < 2000; i++) try(f, $urandom_range(255), $urandom_range(255));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
