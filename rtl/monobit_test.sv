// monobit_test: FIPS 140-2 monobit test on one N-bit sample.
//
// A 14-bit counter counts the ones of the sample. It saturates at its top
// value (16383): since the upper bound 10275 lies far below, saturation never
// changes the verdict, and 14 bits suffice even though the sample has 20000
// bits. The test passes if LO < ones < HI.
//
// Interface (shared by all four tests): `clr` starts a new sample and clears
// the result; each cycle with `bit_valid` high delivers one bit; `last` marks
// the sample's final bit. `en` gates the counter (power saving: a disabled
// test does not toggle). `done` rises the cycle after the last bit and holds,
// together with `pass`, until the next `clr`.
//
// The counter width and interval follow the document; saturation is this
// design's choice.
module monobit_test #(
  parameter int unsigned CNT_W = 14,
  parameter int unsigned LO    = fips_pkg::MONO_LO,
  parameter int unsigned HI    = fips_pkg::MONO_HI
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  logic clr,
  input  logic bit_valid,
  input  logic bit_in,
  input  logic last,
  output logic done,
  output logic pass,
  output logic [CNT_W-1:0] ones
);

  localparam logic [CNT_W-1:0] CNT_MAX = '1;

  always_ff @(posedge clk) begin
    if (!rst_n || clr) begin
      ones <= '0;
      done <= 1'b0;
    end else if (en && bit_valid && !done) begin
      if (bit_in && ones != CNT_MAX) ones <= ones + 1'b1;
      if (last) done <= 1'b1;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(clr && bit_valid));

  assign pass = done && (32'(ones) > LO) && (32'(ones) < HI);

endmodule
