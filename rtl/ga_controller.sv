// ga_controller: controller of the genetic unit.
//
// Runs a generational, elitist evolution of VRC configurations:
//   INIT    fill the POP slots of the chromosome memory with random
//           chromosomes (init_pop_gen);
//   EVAL    for each slot: load its chromosome into the VRC configuration
//           memory, run fitness_eval, store the error in the error memory;
//   SELECT  find the best slot (selection) and copy its chromosome into the
//           parent register; count the generation;
//   stop    when the best error is at most `err_limit` or `max_gens`
//           generations have been evaluated: load the parent into the VRC,
//           raise `done` and go idle;
//   BREED   otherwise write the parent unchanged into slot 0 and a mutant of
//           it into each of slots 1..POP-1, and evaluate again.
// `start` (while idle) begins a run; `busy` is high while a run lasts, which
// is also when the VRC inputs must come from the sample memory. After a run
// `best_err`, `best_chrom` and `gens` hold its result. `gen_done` pulses once
// per generation, after selection, with that generation's best error on
// `best_err`. With elitism the best error never increases.
//
// The document shows these units around a controller and says the
// chromosomes are turned into configuration bits and loaded into the VRC;
// the schedule, the elitism and the stop rule are this design's choices.
module ga_controller
  import vrc_pkg::*;
#(
  parameter int unsigned POP = 8,
  parameter int unsigned EW  = 14,
  localparam int unsigned AW = (POP > 1) ? $clog2(POP) : 1
)(
  input  logic          clk,
  input  logic          rst_n,
  // host
  input  logic          start,
  input  logic [15:0]   max_gens,
  input  logic [EW-1:0] err_limit,
  output logic          busy,
  output logic          done,
  output logic          gen_done,
  output logic [15:0]   gens,
  output logic [EW-1:0] best_err,
  output chrom_t        best_chrom,
  // initial population generation
  output logic          init_start,
  input  logic          init_done,
  input  chrom_t        init_chrom,
  // chromosome memory
  output logic          cm_we,
  output logic [AW-1:0] cm_waddr,
  output chrom_t        cm_wdata,
  output logic [AW-1:0] cm_raddr,
  input  chrom_t        cm_rdata,
  // VRC configuration memory
  output logic          cfg_load,
  output chrom_t        cfg_bits,
  // fitness evaluation and error memory
  output logic          fit_start,
  input  logic          fit_done,
  input  logic [EW-1:0] fit_err,
  output logic          em_we,
  output logic [AW-1:0] em_waddr,
  output logic [EW-1:0] em_wdata,
  // selection
  output logic          sel_start,
  input  logic          sel_done,
  input  logic [AW-1:0] sel_idx,
  input  logic [EW-1:0] sel_err,
  // mutation
  output logic          mut_start,
  input  logic          mut_done,
  input  chrom_t        mut_child
);

  typedef enum logic [3:0] {
    S_IDLE, S_INIT, S_INIT_W, S_LOAD, S_FIT, S_FIT_W, S_SEL, S_SEL_W,
    S_PICK, S_ELITE, S_MUT, S_MUT_W, S_FINISH
  } state_e;

  state_e        state;
  logic [AW-1:0] idx;
  logic [AW-1:0] best_idx;
  logic          last;

  assign last = (32'(idx) == POP - 1);

  // memory and configuration ports
  always_comb begin
    cm_we    = 1'b0;
    cm_waddr = idx;
    cm_wdata = init_chrom;
    cm_raddr = (state == S_PICK) ? best_idx : idx;
    cfg_load = 1'b0;
    cfg_bits = cm_rdata;
    em_we    = 1'b0;
    em_waddr = idx;
    em_wdata = fit_err;
    unique case (state)
      S_INIT_W: cm_we = init_done;
      S_LOAD:   cfg_load = 1'b1;
      S_FIT_W:  em_we = fit_done;
      S_ELITE:  begin cm_we = 1'b1; cm_wdata = best_chrom; end
      S_MUT_W:  begin cm_we = mut_done; cm_wdata = mut_child; end
      S_FINISH: begin cfg_load = 1'b1; cfg_bits = best_chrom; end
      default:  ;
    endcase
  end

  assign init_start = (state == S_INIT);
  assign fit_start  = (state == S_FIT);
  assign sel_start  = (state == S_SEL);
  assign mut_start  = (state == S_MUT);
  assign busy       = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      idx        <= '0;
      best_idx   <= '0;
      best_err   <= '1;
      best_chrom <= '0;
      gens       <= '0;
      done       <= 1'b0;
      gen_done   <= 1'b0;
    end else begin
      gen_done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          state <= S_INIT;
          idx   <= '0;
          gens  <= '0;
          done  <= 1'b0;
        end
        S_INIT:   state <= S_INIT_W;
        S_INIT_W: if (init_done) begin
          if (last) begin idx <= '0; state <= S_LOAD; end
          else      begin idx <= idx + 1'b1; state <= S_INIT; end
        end
        S_LOAD:   state <= S_FIT;
        S_FIT:    state <= S_FIT_W;
        S_FIT_W:  if (fit_done) begin
          if (last) state <= S_SEL;
          else begin idx <= idx + 1'b1; state <= S_LOAD; end
        end
        S_SEL:    state <= S_SEL_W;
        S_SEL_W:  if (sel_done) begin
          best_idx <= sel_idx;
          best_err <= sel_err;
          state    <= S_PICK;
        end
        S_PICK: begin
          best_chrom <= cm_rdata;
          gens       <= gens + 1'b1;
          gen_done   <= 1'b1;
          if (best_err <= err_limit || gens + 1'b1 >= max_gens) state <= S_FINISH;
          else begin idx <= '0; state <= S_ELITE; end
        end
        S_ELITE: begin idx <= 1; state <= (POP > 1) ? S_MUT : S_LOAD; end
        S_MUT:    state <= S_MUT_W;
        S_MUT_W:  if (mut_done) begin
          if (last) begin idx <= '0; state <= S_LOAD; end
          else begin idx <= idx + 1'b1; state <= S_MUT; end
        end
        S_FINISH: begin done <= 1'b1; state <= S_IDLE; end
        default:  state <= S_IDLE;
      endcase
    end
  end

  // a slot write and a configuration load never overlap
  assert property (@(posedge clk) disable iff (!rst_n) !(cm_we && cfg_load));

endmodule
