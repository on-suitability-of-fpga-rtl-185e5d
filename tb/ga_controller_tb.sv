// ga_controller_tb: the controller with behavioural stand-ins for the units
// around it. The stand-in fitness of a chromosome is its number of ones, so
// evolution must drive chromosomes towards zero. Checks: POP initial
// chromosomes are made; every generation evaluates all POP slots, each after
// loading that slot's chromosome; the error stored is the one measured;
// selection results are taken; slot 0 of the next generation is the parent
// and slots 1..POP-1 are the mutants; the best error never increases; a run
// stops at max_gens and, in a second run, as soon as err_limit is reached;
// the final configuration load carries the best chromosome.
module ga_controller_tb;
  import vrc_pkg::*;
  localparam int POP = 8;
  localparam int EW  = 14;

  logic clk = 0, rst_n = 0, start = 0;
  logic [15:0] max_gens = 0, gens;
  logic [EW-1:0] err_limit = 0, best_err;
  logic busy, done, gen_done;
  chrom_t best_chrom;
  logic init_start, init_done = 0;
  chrom_t init_chrom = '0;
  logic cm_we; logic [2:0] cm_waddr, cm_raddr; chrom_t cm_wdata, cm_rdata;
  logic cfg_load; chrom_t cfg_bits;
  logic fit_start, fit_done = 0; logic [EW-1:0] fit_err = 0;
  logic em_we; logic [2:0] em_waddr; logic [EW-1:0] em_wdata;
  logic sel_start, sel_done = 0; logic [2:0] sel_idx = 0; logic [EW-1:0] sel_err = 0;
  logic mut_start, mut_done = 0; chrom_t mut_child = '0;

  ga_controller #(.POP(POP), .EW(EW)) dut (.*);

  chrom_t cmem [POP];
  logic [EW-1:0] emem [POP];
  chrom_t loaded;
  int checks = 0, failures = 0;
  int n_init, n_eval, n_load, n_mut, n_gen;
  int last_best;

  assign cm_rdata = cmem[cm_raddr];

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s t=%0t", what, $time); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // memories
  always @(posedge clk) begin
    if (cm_we) cmem[cm_waddr] <= cm_wdata;
    if (em_we) begin
      emem[em_waddr] <= em_wdata;
      check(em_wdata == fit_err, "stored error");
      check(em_waddr == cm_raddr, "error slot");
    end
    if (cfg_load) loaded <= cfg_bits;
  end

  // stand-ins for the units
  initial forever begin
    @(posedge clk);
    if (init_start) begin
      repeat (3) @(posedge clk);
      for (int b = 0; b < CFG_BITS; b++) init_chrom[b] = 1'($urandom_range(1));
      init_done <= 1; n_init++;
      @(posedge clk) init_done <= 0;
    end
  end
  initial forever begin
    @(posedge clk);
    if (fit_start) begin
      repeat (4) @(posedge clk);
      check(loaded == cmem[cm_raddr], "evaluated chromosome is the slot's");
      fit_err <= EW'($countones(loaded));
      fit_done <= 1; n_eval++;
      @(posedge clk) fit_done <= 0;
    end
  end
  initial forever begin
    @(posedge clk);
    if (sel_start) begin
      int bi, be;
      bi = 0; be = 1 << 20;
      repeat (2) @(posedge clk);
      for (int i = 0; i < POP; i++) if (int'(emem[i]) <= be) begin be = emem[i]; bi = i; end
      sel_idx <= 3'(bi); sel_err <= EW'(be); sel_done <= 1;
      @(posedge clk) sel_done <= 0;
    end
  end
  initial forever begin
    @(posedge clk);
    if (mut_start) begin
      chrom_t c;
      c = best_chrom;
      repeat (2) @(posedge clk);
      c[$urandom_range(CFG_BITS - 1)] ^= 1'b1;
      c[$urandom_range(CFG_BITS - 1)] ^= 1'b1;
      mut_child <= c; mut_done <= 1; n_mut++;
      @(posedge clk) mut_done <= 0;
    end
  end

  // per generation: best error never increases; slots rebuilt as specified
  always @(posedge clk) if (gen_done) begin
    n_gen++;
    check(int'(best_err) <= last_best, "best error increased");
    check(best_chrom == cmem[sel_idx], "parent is the selected slot");
    check(int'(best_err) == $countones(best_chrom), "best error matches parent");
    last_best = best_err;
  end
  always @(posedge clk) if (cm_we && !init_start && dut.state != dut.S_INIT_W) begin
    if (cm_waddr == 0) check(cm_wdata == best_chrom, "elite in slot 0");
    else               check(cm_wdata == mut_child, "mutant written");
  end

  task automatic run(int mg, int lim);
    n_init = 0; n_eval = 0; n_mut = 0; n_gen = 0; last_best = 1 << 20;
    @(negedge clk);
    max_gens = 16'(mg); err_limit = EW'(lim); start = 1;
    @(negedge clk) start = 0;
    check(busy, "busy");
    wait (done);
    @(posedge clk); #1;
    check(!busy, "idle after run");
    check(n_init == POP, "initial population size");
    check(n_eval == POP * n_gen, $sformatf("evaluations %0d gens %0d", n_eval, n_gen));
    check(n_mut == (POP - 1) * (n_gen - 1), "mutants");
    check(int'(gens) == n_gen, "generation count");
    check(loaded == best_chrom, "final configuration is the best");
  endtask

  initial begin
    n_init = 0; n_eval = 0; n_mut = 0; n_gen = 0;
    foreach (cmem[i]) cmem[i] = '0;
    foreach (emem[i]) emem[i] = '1;
    loaded = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // 1. stop by generation limit (limit 0 is unreachable in 40 generations)
    run(40, 0);
    check(n_gen == 40, "stopped at max_gens");
    check(int'(best_err) < 110, $sformatf("evolution made progress: %0d", best_err));
    // 2. stop by error limit
    run(2000, 100);
    check(int'(best_err) <= 100, "error limit reached");
    check(n_gen < 2000, "stopped early at error limit");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
