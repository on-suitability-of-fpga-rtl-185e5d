// vrc_pe: one processing element of the virtual reconfigurable circuit.
//
// Two multiplexers pick the operands X and Y from the NSRC candidate sources
// offered to this PE, a function unit (vrc_fu) computes the function chosen by
// `func`, and the result is held in an 8-bit output register. The selects and
// the function code come straight from the configuration memory, as in the
// document's PE drawing (two input multiplexers driven by configuration bits
// and a function selector).
//
// Timing: `q` is registered; it takes the new value one cycle after the
// sources change. `clr` clears the register synchronously (used before each
// fitness evaluation so that every evaluation starts from the same state).
// The output register is this design's choice: it makes each column one
// pipeline stage, so the array can form both combinational and sequential
// (time-dependent) functions.
module vrc_pe
  import vrc_pkg::*;
#(
  parameter int unsigned NSRC = 8,          // candidate sources
  localparam int unsigned SELW = $clog2(NSRC)
)(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clr,
  input  data_t [NSRC-1:0]     src,
  input  logic [SELW-1:0]      sel1,
  input  logic [SELW-1:0]      sel2,
  input  logic [FW-1:0]        func,
  output data_t                q
);

  data_t x, y, z;
  assign x = src[sel1];
  assign y = src[sel2];

  vrc_fu u_fu (.func(func), .x(x), .y(y), .z(z));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   q <= '0;
    else if (clr) q <= '0;
    else          q <= z;
  end

endmodule
