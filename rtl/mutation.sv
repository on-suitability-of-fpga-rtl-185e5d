// mutation: bit-flip mutation of a parent chromosome.
//
// On `start` it copies `parent` and then, on each of the next MUT_BITS
// cycles, inverts one bit of the copy at position rnd[15:0] mod CFG_BITS,
// taken from the random number generator. It then raises `done` for one cycle
// with the offspring on `child` (held until the next start). Two draws may hit
// the same bit and cancel. Latency: MUT_BITS + 1 cycles from start to done.
// The document names a mutation unit; the bit-flip scheme and MUT_BITS are
// this design's choices. Only the low 16 bits of `rnd` are used.
module mutation
  import vrc_pkg::*;
#(
  parameter int unsigned MUT_BITS = 3
)(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  chrom_t      parent,
  input  logic [31:0] rnd,
  output logic        busy,
  output logic        done,
  output chrom_t      child
);

  localparam int unsigned CW = $clog2(MUT_BITS + 1);
  localparam int unsigned PW = $clog2(CFG_BITS);

  logic [CW-1:0]  cnt;
  logic [PW-1:0]  pos;
  assign pos = PW'(32'(rnd[15:0]) % CFG_BITS);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      child <= '0;
      cnt   <= '0;
      busy  <= 1'b0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        child <= parent;
        cnt   <= '0;
        busy  <= 1'b1;
      end else if (busy) begin
        child[pos] <= ~child[pos];
        cnt        <= cnt + 1'b1;
        if (cnt == CW'(MUT_BITS - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

endmodule
