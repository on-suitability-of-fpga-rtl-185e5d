// ehw_top_tb: end-to-end test of the evolvable system at its default sizes
// (population 8, 32 training samples).
// Workload: single sensor failure. Sensor 3 reads garbage, the target is the
// mean of sensors 1 and 2.
//  1. A hand-made averaging configuration is loaded through the direct
//     configuration port and one PE word is rewritten; the live output is
//     checked against the reference model.
//  2. An evolution run limited by generation count: the reported best error
//     must equal the error the reference model measures for the reported
//     chromosome, the VRC must end up configured with it, and the best error
//     must never grow from one generation to the next.
//  3. Live operation with the evolved configuration (inputs switched from the
//     sample memory to the external inputs), checked against the model.
//  4. A second run that stops at a loose error limit.
//  5. A two-generation run that stops at its generation limit.
// Each mechanism (initial population, evaluation, selection, mutation,
// elitist copy, both stop rules, direct load, PE word write, register clear,
// input switch) is counted and must occur at least once.
module ehw_top_tb;
  import vrc_pkg::*;
  import vrc_ref_pkg::*;

  localparam int NSMP = 32;
  localparam int GENS = 3000;

  logic clk = 0, rst_n = 0;
  logic smp_we = 0; logic [4:0] smp_addr = 0; sample_t smp_wdata = '0;
  logic seed_we = 0; logic [31:0] seed = 0;
  logic ga_start = 0; logic [15:0] max_gens = 0; logic [13:0] err_limit = 0;
  logic ga_busy, ga_done, ga_gen_done; logic [15:0] ga_gens; logic [13:0] ga_best_err;
  chrom_t ga_best_chrom, cfg_out;
  logic cfg_load = 0; chrom_t cfg_bits = '0; logic cfg_we = 0;
  logic [4:0] cfg_addr = 0; logic [9:0] cfg_wdata = 0;
  data_t [2:0] ei = '0; data_t vrc_y;

  ehw_top dut (.*);

  sample_t smp [NSMP];
  vrc_model m;
  int checks = 0, failures = 0;
  int n_init, n_eval, n_sel, n_mut, n_elite, n_clr, n_stop_gens, n_stop_limit;
  int n_direct, n_word, n_switch, n_live;
  int last_best = 1 << 20;

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s t=%0t", what, $time); end
  endtask

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  always @(posedge clk) if (rst_n) begin
    if (dut.init_done) n_init++;
    if (dut.fit_done)  n_eval++;
    if (dut.sel_done)  n_sel++;
    if (dut.mut_done)  n_mut++;
    if (dut.vrc_clr)   n_clr++;
    if (dut.cm_we && dut.u_ctrl.state == dut.u_ctrl.S_ELITE) n_elite++;
    if (ga_gen_done) begin
      check(int'(ga_best_err) <= last_best, "best error grew");
      last_best = ga_best_err;
    end
  end

  // summed absolute error of chromosome c on the training set, by the model
  function automatic int model_err(chrom_t c);
    int e = 0;
    m.cfg = c; m.clear();
    for (int t = 0; t < NSMP + LATENCY; t++) begin
      if (t >= LATENCY) begin
        int d = m.y() - int'(smp[t - LATENCY].target);
        e += (d < 0) ? -d : d;
      end
      if (t < NSMP) m.step(smp[t].in1, smp[t].in2, smp[t].in3);
      else          m.step(0, 0, 0);
    end
    return e;
  endfunction

  // live operation: random inputs, output compared with the model
  task automatic live(chrom_t c, int cycles);
    m.cfg = c;
    for (int i = 0; i < cycles; i++) begin
      int a, b, s3;
      a = $urandom_range(255); b = $urandom_range(255); s3 = $urandom_range(255);
      @(negedge clk) ei = {8'(s3), 8'(b), 8'(a)};
      @(posedge clk) m.step(a, b, s3);
      #1 check(int'(vrc_y) == m.y(), $sformatf("live y=%0d model=%0d", vrc_y, m.y()));
      n_live++;
    end
  endtask

  task automatic evolve(int gens, int limit);
    last_best = 1 << 20;
    @(negedge clk) begin max_gens = 16'(gens); err_limit = 14'(limit); ga_start = 1; end
    @(negedge clk) ga_start = 0;
    wait (ga_done);
    @(negedge clk);
  endtask

  initial begin
    chrom_t c;
    int e, t0;
    m = new();
    n_init = 0; n_eval = 0; n_sel = 0; n_mut = 0; n_elite = 0; n_clr = 0;
    n_stop_gens = 0; n_stop_limit = 0; n_direct = 0; n_word = 0; n_switch = 0; n_live = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // training set: sensor 3 faulty
    for (int i = 0; i < NSMP; i++) begin
      smp[i].in1 = 8'($urandom_range(40, 200));
      smp[i].in2 = 8'(int'(smp[i].in1) + $urandom_range(0, 20) - 10);
      smp[i].in3 = 8'($urandom_range(255));
      smp[i].target = 8'((int'(smp[i].in1) + int'(smp[i].in2)) / 2);
      @(negedge clk) begin smp_we = 1; smp_addr = 5'(i); smp_wdata = smp[i]; end
    end
    @(negedge clk) begin smp_we = 0; seed_we = 1; seed = 32'hC0FF_EE01; end
    @(negedge clk) seed_we = 0;

    // 1. direct configuration: average of sensors 1 and 2
    c = '0;
    c = set_pe(c, 0, 0, 1, 5);
    for (int col = 1; col <= 5; col++) c = set_pe(c, 4 * col, 0, 7, 2);
    c = set_pe(c, 24, 0, 7, 2);
    @(negedge clk) begin cfg_bits = c; cfg_load = 1; end
    @(negedge clk) cfg_load = 0;
    n_direct++;
    check(cfg_out == c, "direct load");
    check(model_err(c) == 0, "hand-made circuit is exact on the training set");
    m.cfg = c; m.clear();
    for (int i = 0; i < 8; i++) begin @(negedge clk) ei = '0; @(posedge clk) m.step(0, 0, 0); end
    live(c, 50);
    // rewrite PE 0 to take min(sensor 1, sensor 2) through the PE word port
    c = set_pe(c, 0, 0, 1, 9);
    @(negedge clk) begin cfg_we = 1; cfg_addr = 0; cfg_wdata = 10'(c[7:0]); end
    @(posedge clk) m.step(int'(ei[0]), int'(ei[1]), int'(ei[2]));
    #1 cfg_we = 0;
    m.cfg = c;
    n_word++;
    check(cfg_out == c, "PE word write");
    live(c, 30);

    // 2. evolution limited by generations
    t0 = $time;
    evolve(GENS, 0);
    $display("run 1: %0d generations, best error %0d, %0d cycles", ga_gens, ga_best_err,
             ($time - t0) / 10);
    if (int'(ga_gens) == GENS) n_stop_gens++;
    check(int'(ga_gens) == GENS || ga_best_err == 0, "generation limit");
    check(int'(ga_gens) < GENS || ga_best_err != 0, "stopped at zero error");
    e = model_err(ga_best_chrom);
    check(e == int'(ga_best_err), $sformatf("reported error %0d, model %0d", ga_best_err, e));
    check(cfg_out == ga_best_chrom, "VRC left configured with the best chromosome");
    check(n_init == 8, "initial population");
    check(n_eval == 8 * int'(ga_gens), "evaluations");
    check(n_sel == int'(ga_gens), "selections");
    check(n_mut == 7 * (int'(ga_gens) - 1), "mutations");

    // 3. live operation with the evolved circuit
    m.cfg = ga_best_chrom; m.clear();
    for (int i = 0; i < 8; i++) begin @(negedge clk) ei = '0; @(posedge clk) m.step(0, 0, 0); end
    n_switch++;
    live(ga_best_chrom, 100);

    // 4. stop at a loose error limit
    evolve(GENS, int'(ga_best_err) + 2000);
    $display("run 2: %0d generations, best error %0d", ga_gens, ga_best_err);
    if (int'(ga_gens) < GENS) n_stop_limit++;
    check(int'(ga_best_err) <= int'(ga_best_err) + 2000, "limit");
    check(model_err(ga_best_chrom) == int'(ga_best_err), "run 2 error");

    // 5. a short run that must stop at its generation limit
    evolve(2, 0);
    if (int'(ga_gens) == 2 && ga_best_err != 0) n_stop_gens++;
    check(int'(ga_gens) == 2, "short run generation count");

    $display("mechanisms: init=%0d eval=%0d select=%0d mutate=%0d elite=%0d clear=%0d stop_gens=%0d stop_limit=%0d direct=%0d word=%0d switch=%0d live=%0d",
             n_init, n_eval, n_sel, n_mut, n_elite, n_clr, n_stop_gens, n_stop_limit,
             n_direct, n_word, n_switch, n_live);
    check(n_init > 0 && n_eval > 0 && n_sel > 0 && n_mut > 0 && n_elite > 0 && n_clr > 0, "GA mechanisms");
    check(n_stop_gens > 0, "stop by generation limit seen");
    check(n_stop_limit > 0, "stop by error limit seen");
    check(n_direct > 0 && n_word > 0 && n_switch > 0 && n_live > 0, "configuration and live mechanisms");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
