// ehw_cases_tb: the two remaining sensor workloads on the full system at its
// default sizes (the single-sensor-failure case runs in ehw_top_tb).
//  Case II  sensors 1 and 2 faulty (one stuck, one random), target = sensor 3.
//  Case III all three sensors carry the same signal plus zero-mean Gaussian
//           noise of variance 0.1 V^2 (sigma 0.316 V, about 16 codes at
//           5 V = 255), target = the noise-free signal.
// For each case: evolve, then check that the reported error equals the error
// the reference model measures for the reported chromosome, that the best
// error of the last generation is below that of the first, and that the VRC
// runs the result on live inputs exactly as the model does. The errors
// reached are printed together with a plain reference (for case III, the
// error of using sensor 1 alone).
module ehw_cases_tb;
  import vrc_pkg::*;
  import vrc_ref_pkg::*;

  localparam int NSMP = 32;
  localparam int GENS = 2000;

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
  int first_best;
  bit first_seen;

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s t=%0t", what, $time); end
  endtask

  initial begin
    repeat (4_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (ga_gen_done && !first_seen) begin
    first_best = ga_best_err;
    first_seen = 1;
  end

  function automatic int model_err(chrom_t c);
    int e, d;
    e = 0;
    m.cfg = c; m.clear();
    for (int t = 0; t < NSMP + LATENCY; t++) begin
      if (t >= LATENCY) begin
        d = m.y() - int'(smp[t - LATENCY].target);
        e += (d < 0) ? -d : d;
      end
      if (t < NSMP) m.step(smp[t].in1, smp[t].in2, smp[t].in3);
      else          m.step(0, 0, 0);
    end
    return e;
  endfunction

  function automatic int clip(int v);
    return (v < 0) ? 0 : (v > 255) ? 255 : v;
  endfunction

  // approximately Gaussian, mean 0, sigma 16 codes (sum of 12 uniforms)
  function automatic int noise();
    int s;
    s = 0;
    for (int i = 0; i < 12; i++) s += $urandom_range(0, 1000);
    return ((s - 6000) * 16) / 1000;
  endfunction

  task automatic load_samples();
    for (int i = 0; i < NSMP; i++) begin
      @(negedge clk) begin smp_we = 1; smp_addr = 5'(i); smp_wdata = smp[i]; end
    end
    @(negedge clk) smp_we = 0;
  endtask

  task automatic run_case(string name, int reference);
    int e;
    first_seen = 0;
    @(negedge clk) begin max_gens = 16'(GENS); err_limit = 0; ga_start = 1; end
    @(negedge clk) ga_start = 0;
    wait (ga_done);
    @(negedge clk);
    e = model_err(ga_best_chrom);
    $display("%s: %0d generations, first-generation best error %0d, final %0d, reference %0d",
             name, ga_gens, first_best, ga_best_err, reference);
    check(e == int'(ga_best_err), $sformatf("%s reported %0d model %0d", name, ga_best_err, e));
    check(int'(ga_best_err) < first_best, {name, " evolution improved"});
    check(cfg_out == ga_best_chrom, {name, " configured"});
    // live run
    m.cfg = ga_best_chrom; m.clear();
    for (int i = 0; i < 8; i++) begin @(negedge clk) ei = '0; @(posedge clk) m.step(0, 0, 0); end
    for (int i = 0; i < 64; i++) begin
      int a, b, c;
      a = $urandom_range(255); b = $urandom_range(255); c = $urandom_range(255);
      @(negedge clk) ei = {8'(c), 8'(b), 8'(a)};
      @(posedge clk) m.step(a, b, c);
      #1 check(int'(vrc_y) == m.y(), {name, " live output"});
    end
  endtask

  initial begin
    int ref3, s;
    m = new();
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk) begin seed_we = 1; seed = 32'h5EED_0002; end
    @(negedge clk) seed_we = 0;

    // Case II: sensors 1 and 2 faulty
    for (int i = 0; i < NSMP; i++) begin
      smp[i].in1 = 8'd255;                       // stuck at full scale
      smp[i].in2 = 8'($urandom_range(255));      // erratic
      smp[i].in3 = 8'($urandom_range(30, 220));
      smp[i].target = smp[i].in3;
    end
    load_samples();
    run_case("case II", 0);

    // Case III: noisy sensors, slowly varying signal
    ref3 = 0;
    s = 128;
    for (int i = 0; i < NSMP; i++) begin
      s = clip(s + $urandom_range(0, 16) - 8);
      smp[i].target = 8'(s);
      smp[i].in1 = 8'(clip(s + noise()));
      smp[i].in2 = 8'(clip(s + noise()));
      smp[i].in3 = 8'(clip(s + noise()));
      ref3 += (smp[i].in1 > smp[i].target) ? smp[i].in1 - smp[i].target : smp[i].target - smp[i].in1;
    end
    load_samples();
    run_case("case III", ref3);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
