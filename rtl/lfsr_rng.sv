// lfsr_rng: pseudo-random bit source that stands in for a true RNG while the
// monitor is measured, so that the source itself adds as little activity as
// possible.
//
// A 32-bit Fibonacci LFSR with the maximal-length polynomial
// x^32 + x^22 + x^2 + x + 1 shifts once per cycle while `en` is high; `bit_out`
// is its top bit and `valid` follows `en` one cycle later. Reset loads SEED
// (must be non-zero).
//
// The document only says an LFSR-based RNG was used; length, polynomial and
// seed are this design's choice.
module lfsr_rng #(
  parameter logic [31:0] SEED = 32'hACE1_2468
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  output logic bit_out,
  output logic valid
);

  logic [31:0] state;
  logic        fb;

  assign fb = state[31] ^ state[21] ^ state[1] ^ state[0];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= SEED;
      valid <= 1'b0;
    end else begin
      valid <= en;
      if (en) state <= {state[30:0], fb};
    end
  end

  assign bit_out = state[31];

endmodule
