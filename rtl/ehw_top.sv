// ehw_top: evolvable hardware system with a virtual reconfigurable circuit.
//
// A genetic unit searches for a configuration of the 25-PE VRC whose output,
// for the three sensor readings of each training sample, matches the
// sample's target; the VRC then runs that configuration on live sensor data.
// Typical use: the host (which estimates the plant and decides which sensors
// have failed) writes training samples whose target ignores the failed
// sensors, starts a run, and the VRC reconfigures itself to mask the fault.
//
// Blocks: sample memory (Input 1..3, Target), random number generator,
// initial-population generator, chromosome memory, error memory, fitness
// evaluation, selection, mutation, controller and the VRC with its
// configuration memory. A multiplexer in front of the VRC feeds it from the
// sample memory while a run is busy and from the external sensor inputs `ei`
// otherwise.
//
// Host interface:
//   smp_we/smp_addr/smp_wdata  write a training sample
//   seed_we/seed               seed the random number generator
//   ga_start (when idle)       begin an evolution run with the limits
//                              max_gens and err_limit; ga_busy while it
//                              runs, ga_done after it, ga_gen_done per
//                              generation; ga_gens, ga_best_err and
//                              ga_best_chrom report the result
//   cfg_load/cfg_bits,         write the VRC configuration directly (whole
//   cfg_we/cfg_addr/cfg_wdata  chromosome, or one PE word); ignored while
//                              a run is busy
//   cfg_out                    current VRC configuration
//   ei, vrc_y                  live sensor inputs and VRC output; the output
//                              follows the inputs after 7 cycles
//
// The set of blocks follows the document's block diagram; their insides, the
// sizes POP and NS and the host interface are this design's choices.
module ehw_top
  import vrc_pkg::*;
#(
  parameter int unsigned POP      = 8,
  parameter int unsigned NS       = 32,
  parameter int unsigned MUT_BITS = 3,
  localparam int unsigned EW      = DW + $clog2(NS + 1),
  localparam int unsigned PAW     = (POP > 1) ? $clog2(POP) : 1,
  localparam int unsigned SAW     = (NS > 1) ? $clog2(NS) : 1
)(
  input  logic                   clk,
  input  logic                   rst_n,
  // training samples
  input  logic                   smp_we,
  input  logic [SAW-1:0]         smp_addr,
  input  sample_t                smp_wdata,
  // genetic unit
  input  logic                   seed_we,
  input  logic [31:0]            seed,
  input  logic                   ga_start,
  input  logic [15:0]            max_gens,
  input  logic [EW-1:0]          err_limit,
  output logic                   ga_busy,
  output logic                   ga_done,
  output logic                   ga_gen_done,
  output logic [15:0]            ga_gens,
  output logic [EW-1:0]          ga_best_err,
  output chrom_t                 ga_best_chrom,
  // direct configuration port
  input  logic                   cfg_load,
  input  chrom_t                 cfg_bits,
  input  logic                   cfg_we,
  input  logic [$clog2(NPE)-1:0] cfg_addr,
  input  logic [W1-1:0]          cfg_wdata,
  output chrom_t                 cfg_out,
  // live data path
  input  data_t [NIN-1:0]        ei,
  output data_t                  vrc_y
);

  // random numbers
  logic [31:0] rnd;
  rng u_rng (.clk, .rst_n, .seed_we, .seed, .rnd);

  // sample memory
  logic [SAW-1:0] fit_smp_addr, fit_tgt_addr;
  sample_t        fit_smp, fit_tgt;
  sample_mem #(.NS(NS)) u_smp (
    .clk, .rst_n,
    .we(smp_we), .waddr(smp_addr), .wdata(smp_wdata),
    .raddr_a(fit_smp_addr), .rdata_a(fit_smp),
    .raddr_b(fit_tgt_addr), .rdata_b(fit_tgt)
  );

  // initial population generation
  logic   init_start, init_done;
  chrom_t init_chrom;
  init_pop_gen u_init (
    .clk, .rst_n, .start(init_start), .rnd, .busy(),
    .done(init_done), .chrom(init_chrom)
  );

  // chromosome memory
  logic           cm_we;
  logic [PAW-1:0] cm_waddr, cm_raddr;
  chrom_t         cm_wdata, cm_rdata;
  chrom_mem #(.POP(POP)) u_cm (
    .clk, .rst_n, .we(cm_we), .waddr(cm_waddr), .wdata(cm_wdata),
    .raddr(cm_raddr), .rdata(cm_rdata)
  );

  // error memory
  logic           em_we;
  logic [PAW-1:0] em_waddr, em_raddr;
  logic [EW-1:0]  em_wdata, em_rdata;
  err_mem #(.POP(POP), .EW(EW)) u_em (
    .clk, .rst_n, .we(em_we), .waddr(em_waddr), .wdata(em_wdata),
    .raddr(em_raddr), .rdata(em_rdata)
  );

  // selection
  logic           sel_start, sel_done;
  logic [PAW-1:0] sel_idx;
  logic [EW-1:0]  sel_err;
  selection #(.POP(POP), .EW(EW)) u_sel (
    .clk, .rst_n, .start(sel_start), .raddr(em_raddr), .rdata(em_rdata), .busy(),
    .done(sel_done), .best_idx(sel_idx), .best_err(sel_err)
  );

  // mutation
  logic   mut_start, mut_done;
  chrom_t mut_child;
  mutation #(.MUT_BITS(MUT_BITS)) u_mut (
    .clk, .rst_n, .start(mut_start), .parent(ga_best_chrom), .rnd, .busy(),
    .done(mut_done), .child(mut_child)
  );

  // fitness evaluation
  logic            fit_start, fit_done, vrc_clr;
  logic [EW-1:0]   fit_err;
  data_t [NIN-1:0] fit_x;
  fitness_eval #(.NS(NS), .EW(EW)) u_fit (
    .clk, .rst_n, .start(fit_start), .busy(), .done(fit_done),
    .err(fit_err),
    .smp_addr(fit_smp_addr), .smp(fit_smp),
    .tgt_addr(fit_tgt_addr), .tgt(fit_tgt),
    .vrc_clr, .x(fit_x), .y(vrc_y)
  );

  // controller
  logic   ga_cfg_load;
  chrom_t ga_cfg_bits;
  ga_controller #(.POP(POP), .EW(EW)) u_ctrl (
    .clk, .rst_n,
    .start(ga_start), .max_gens, .err_limit,
    .busy(ga_busy), .done(ga_done), .gen_done(ga_gen_done), .gens(ga_gens),
    .best_err(ga_best_err), .best_chrom(ga_best_chrom),
    .init_start, .init_done, .init_chrom,
    .cm_we, .cm_waddr, .cm_wdata, .cm_raddr, .cm_rdata,
    .cfg_load(ga_cfg_load), .cfg_bits(ga_cfg_bits),
    .fit_start, .fit_done, .fit_err,
    .em_we, .em_waddr, .em_wdata,
    .sel_start, .sel_done, .sel_idx, .sel_err,
    .mut_start, .mut_done, .mut_child
  );

  // VRC with its input multiplexer and configuration source multiplexer
  data_t [NIN-1:0] vrc_x;
  assign vrc_x = ga_busy ? fit_x : ei;

  vrc u_vrc (
    .clk, .rst_n, .clr(vrc_clr),
    .cfg_load(ga_busy ? ga_cfg_load : cfg_load),
    .cfg_bits(ga_busy ? ga_cfg_bits : cfg_bits),
    .cfg_we(cfg_we && !ga_busy),
    .cfg_addr, .cfg_wdata,
    .cfg_out,
    .x(vrc_x), .y(vrc_y)
  );

endmodule
