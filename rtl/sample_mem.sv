// sample_mem: training-sample memory of the genetic unit.
//
// Holds NS samples, each made of the three sensor readings (Input 1..3) and
// the wanted output (Target), as drawn in the document's block diagram of the
// evolvable system. The host writes one sample per cycle through (we, waddr,
// wdata). Two asynchronous read ports serve the fitness evaluation: port A
// supplies the inputs of the sample entering the VRC, port B the target of
// the sample whose result is leaving it. Implemented as a register array
// cleared by reset. The sample count and the port structure are this
// design's choices; the document does not size the memory.
module sample_mem
  import vrc_pkg::*;
#(
  parameter int unsigned NS = 32,
  localparam int unsigned AW = (NS > 1) ? $clog2(NS) : 1
)(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  sample_t       wdata,
  input  logic [AW-1:0] raddr_a,
  output sample_t       rdata_a,
  input  logic [AW-1:0] raddr_b,
  output sample_t       rdata_b
);

  sample_t mem [NS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(NS); i++) mem[i] <= '0;
    end else if (we) begin
      mem[waddr] <= wdata;
    end
  end

  assign rdata_a = mem[raddr_a];
  assign rdata_b = mem[raddr_b];

endmodule
