// err_mem: error memory, one fitness value per population member.
//
// POP entries of EW bits (the summed absolute error of that chromosome, lower
// is better), one synchronous write port and one asynchronous read port, as a
// register array. Reset fills it with all ones (worst error). Sizes are this
// design's choices.
module err_mem #(
  parameter int unsigned POP = 8,
  parameter int unsigned EW  = 14,
  localparam int unsigned AW = (POP > 1) ? $clog2(POP) : 1
)(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [EW-1:0] wdata,
  input  logic [AW-1:0] raddr,
  output logic [EW-1:0] rdata
);

  logic [EW-1:0] mem [POP];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(POP); i++) mem[i] <= '1;
    end else if (we) begin
      mem[waddr] <= wdata;
    end
  end

  assign rdata = mem[raddr];

endmodule
