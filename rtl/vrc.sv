// vrc: the virtual reconfigurable circuit, a 25-PE array with its
// configuration memory.
//
// Structure: 6 columns of 4 PEs and one output PE. A PE of the first column
// takes each operand from one of 4 sources: circuit inputs x[0], x[1], x[2]
// or zero. Every other PE (columns 1..5 and the output PE) takes each
// operand from one of 8 sources:
//   0..3  the outputs of the 4 PEs of the preceding column,
//   4..6  circuit inputs x[0], x[1], x[2],
//   7     zero.
// The output PE (PE 24) drives `y`. Every PE output is registered, so a
// change at `x` reaches `y` after LATENCY (7) clock cycles, and a PE that
// combines a circuit input with a preceding-column output combines samples
// of different ages (a tap of a filter).
//
// Configuration: see vrc_cfg_mem for the two write ports and vrc_pkg for the
// chromosome layout. `cfg_out` shows the current configuration. `clr` clears
// all PE registers synchronously.
//
// The PE count and array shape, the 8-source limit and the 8/10-bit PE words
// follow the document; which 8 sources a PE sees is this design's choice.
module vrc
  import vrc_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    clr,
  // configuration port
  input  logic                    cfg_load,
  input  chrom_t                  cfg_bits,
  input  logic                    cfg_we,
  input  logic [$clog2(NPE)-1:0]  cfg_addr,
  input  logic [W1-1:0]           cfg_wdata,
  output chrom_t                  cfg_out,
  // data path
  input  data_t [NIN-1:0]         x,
  output data_t                   y
);

  chrom_t cfg;
  data_t [NPE-1:0] q;   // PE outputs

  vrc_cfg_mem u_cfg (
    .clk, .rst_n,
    .load(cfg_load), .load_bits(cfg_bits),
    .we(cfg_we), .waddr(cfg_addr), .wdata(cfg_wdata),
    .cfg
  );
  assign cfg_out = cfg;

  for (genvar p = 0; p < NPE; p++) begin : g_pe
    localparam int unsigned OFF = cfg_offset(p);
    if (p < ROWS) begin : g_first
      data_t [3:0] src;
      assign src = {data_t'(0), x[2], x[1], x[0]};
      vrc_pe #(.NSRC(4)) u_pe (
        .clk, .rst_n, .clr, .src,
        .sel1(cfg[OFF +: SW0]),
        .sel2(cfg[OFF + SW0 +: SW0]),
        .func(cfg[OFF + 2*SW0 +: FW]),
        .q(q[p])
      );
    end else begin : g_rest
      // first PE of the preceding column
      localparam int unsigned PREV = ((p - ROWS) / ROWS) * ROWS;
      data_t [7:0] src;
      assign src = {data_t'(0), x[2], x[1], x[0],
                    q[PREV+3], q[PREV+2], q[PREV+1], q[PREV]};
      vrc_pe #(.NSRC(8)) u_pe (
        .clk, .rst_n, .clr, .src,
        .sel1(cfg[OFF +: SW]),
        .sel2(cfg[OFF + SW +: SW]),
        .func(cfg[OFF + 2*SW +: FW]),
        .q(q[p])
      );
    end
  end

  assign y = q[NPE-1];

endmodule
