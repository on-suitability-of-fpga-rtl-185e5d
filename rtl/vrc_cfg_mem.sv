// vrc_cfg_mem: configuration memory of the VRC, with its configuration port.
//
// A register array of CFG_BITS (242) flip-flops whose every bit drives the
// PE multiplexers and function selectors directly (output `cfg`). It is written
// in one of two ways:
//   * `load`: the whole chromosome `load_bits` is taken in one cycle (used by
//     the genetic unit, which handles whole chromosomes);
//   * `we`: the configuration port writes the word of one PE, `waddr` giving
//     the PE number (0..24) and `wdata` the word, right-aligned (8 bits used
//     for PEs 0..3, 10 bits for the others).
// `load` wins when both are asserted. Writes take effect at the next clock
// edge; reset clears the memory (every PE then computes X << 1 of input 1).
// The register array and the configuration port follow the document; the
// two write modes, their priority and the reset value are choices made here.
module vrc_cfg_mem
  import vrc_pkg::*;
(
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      load,
  input  chrom_t                    load_bits,
  input  logic                      we,
  input  logic [$clog2(NPE)-1:0]    waddr,
  input  logic [W1-1:0]             wdata,
  output chrom_t                    cfg
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg <= '0;
    end else if (load) begin
      cfg <= load_bits;
    end else if (we && 32'(waddr) < NPE) begin
      for (int unsigned p = 0; p < NPE; p++) begin
        if (32'(waddr) == p) begin
          for (int unsigned b = 0; b < cfg_width(p); b++)
            cfg[cfg_offset(p) + b] <= wdata[b];
        end
      end
    end
  end

endmodule
