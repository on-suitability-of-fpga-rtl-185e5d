// chrom_mem: chromosome memory holding the population.
//
// POP entries of one 242-bit chromosome each, one synchronous write port and
// one asynchronous read port, as a register array cleared by reset. The
// population size is this design's choice; the document does not give one.
module chrom_mem
  import vrc_pkg::*;
#(
  parameter int unsigned POP = 8,
  localparam int unsigned AW = (POP > 1) ? $clog2(POP) : 1
)(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  chrom_t        wdata,
  input  logic [AW-1:0] raddr,
  output chrom_t        rdata
);

  chrom_t mem [POP];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(POP); i++) mem[i] <= '0;
    end else if (we) begin
      mem[waddr] <= wdata;
    end
  end

  assign rdata = mem[raddr];

endmodule
