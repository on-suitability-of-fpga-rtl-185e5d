// init_pop_gen: initial-population generation.
//
// On `start` it builds one random chromosome from NWORD consecutive 32-bit
// words of the random number generator, one word per cycle, lowest bits
// first, and raises `done` for one cycle with the chromosome on `chrom`
// (held until the next start). A chromosome takes NWORD = 8 cycles. Unused
// function codes that may come out are harmless: such a PE passes X. The
// document names this unit only; the construction is this design's choice.
module init_pop_gen
  import vrc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [31:0] rnd,
  output logic        busy,
  output logic        done,
  output chrom_t      chrom
);

  localparam int unsigned NWORD = (CFG_BITS + 31) / 32;
  localparam int unsigned CW    = $clog2(NWORD + 1);

  logic [NWORD*32-1:0] acc;
  logic [CW-1:0]       cnt;

  assign chrom = acc[CFG_BITS-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc  <= '0;
      cnt  <= '0;
      busy <= 1'b0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy <= 1'b1;
        cnt  <= '0;
      end else if (busy) begin
        acc  <= {rnd, acc[NWORD*32-1:32]};
        cnt  <= cnt + 1'b1;
        if (cnt == CW'(NWORD - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

endmodule
