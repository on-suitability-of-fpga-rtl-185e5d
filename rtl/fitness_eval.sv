// fitness_eval: fitness evaluation of the chromosome loaded in the VRC.
//
// On `start` it clears the VRC's PE registers for one cycle, then streams the
// NS training samples into the VRC, one per cycle (port A of the sample
// memory, `smp_addr`), and `x` carries that sample's three sensor readings.
// LATENCY cycles after a sample enters, the VRC output `y` is compared with
// the sample's target (port B, `tgt_addr`) and the absolute difference is
// added to the error. After the last sample has left the VRC, `done` pulses
// for one cycle and `err` holds the summed absolute error (0 is a perfect
// circuit). Total time: 1 + NS + LATENCY cycles from start to done.
// The document names the fitness evaluation between the VRC, the sample
// memory and the error memory; the summed absolute error is this design's
// choice of measure.
module fitness_eval
  import vrc_pkg::*;
#(
  parameter int unsigned NS = 32,
  parameter int unsigned EW = DW + $clog2(NS + 1),
  localparam int unsigned AW = (NS > 1) ? $clog2(NS) : 1
)(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  output logic            busy,
  output logic            done,
  output logic [EW-1:0]   err,
  // sample memory
  output logic [AW-1:0]   smp_addr,
  input  sample_t         smp,
  output logic [AW-1:0]   tgt_addr,
  input  sample_t         tgt,
  // VRC
  output logic            vrc_clr,
  output data_t [NIN-1:0] x,
  input  data_t           y
);

  localparam int unsigned TW = $clog2(NS + LATENCY + 1);

  logic [TW-1:0] t;        // cycle of the stream
  logic          running;
  data_t         diff;

  assign smp_addr = (32'(t) < NS) ? AW'(t) : '0;
  assign tgt_addr = (32'(t) >= LATENCY) ? AW'(32'(t) - LATENCY) : '0;
  assign x        = (running && 32'(t) < NS) ? {smp.in3, smp.in2, smp.in1} : '0;
  assign diff     = (y > tgt.target) ? (y - tgt.target) : (tgt.target - y);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      t       <= '0;
      running <= 1'b0;
      busy    <= 1'b0;
      done    <= 1'b0;
      vrc_clr <= 1'b0;
      err     <= '0;
    end else begin
      done    <= 1'b0;
      vrc_clr <= 1'b0;
      if (start && !busy) begin
        busy    <= 1'b1;
        vrc_clr <= 1'b1;
        err     <= '0;
        t       <= '0;
      end else if (busy && !running) begin
        running <= 1'b1;              // clear cycle over
      end else if (running) begin
        if (32'(t) >= LATENCY) err <= err + EW'(diff);
        if (32'(t) == NS + LATENCY - 1) begin
          running <= 1'b0;
          busy    <= 1'b0;
          done    <= 1'b1;
        end else begin
          t <= t + 1'b1;
        end
      end
    end
  end

  // the sample stream never runs past the end of the sample memory
  assert property (@(posedge clk) disable iff (!rst_n) running |-> 32'(t) < NS + LATENCY);
  // done is a single-cycle pulse
  assert property (@(posedge clk) disable iff (!rst_n) done |=> !done);

endmodule
