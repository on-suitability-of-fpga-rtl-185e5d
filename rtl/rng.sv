// rng: random number generation for the genetic unit.
//
// A free-running 32-bit Galois linear-feedback shift register with the
// maximal-length polynomial x^32 + x^22 + x^2 + x + 1 (period 2^32 - 1). It
// advances every clock cycle; `seed_we` loads `seed` instead (a zero seed,
// which would lock the register, is replaced by 1). `rnd` is the current
// register value. The document only names a random number generator; the
// LFSR, its polynomial and the seed port are this design's choices.
module rng (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        seed_we,
  input  logic [31:0] seed,
  output logic [31:0] rnd
);

  localparam logic [31:0] POLY = 32'h8020_0003;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       rnd <= 32'h1;
    else if (seed_we) rnd <= (seed == '0) ? 32'h1 : seed;
    else              rnd <= rnd[0] ? ((rnd >> 1) ^ POLY) : (rnd >> 1);
  end

endmodule
