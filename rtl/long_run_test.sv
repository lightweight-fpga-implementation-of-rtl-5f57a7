// long_run_test: FIPS 140-2 long-run test on one N-bit sample.
//
// A 5-bit counter holds the length of the current run of equal bits; it
// restarts at 1 when the bit changes and saturates at 31. A sticky flag is set
// as soon as a run reaches MAX_RUN (26) bits, so the sample passes only if its
// longest run of 0s and of 1s is shorter than 26.
//
// Interface and timing are those of monobit_test: `done` and `pass` are valid
// from the cycle after the `last` bit until the next `clr`.
//
// Counter width and limit follow the document; saturation and the sticky flag
// are this design's choice.
module long_run_test #(
  parameter int unsigned CNT_W   = 5,
  parameter int unsigned MAX_RUN = fips_pkg::LONG_RUN_MAX
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  logic clr,
  input  logic bit_valid,
  input  logic bit_in,
  input  logic last,
  output logic done,
  output logic pass
);

  localparam logic [CNT_W-1:0] CNT_MAX = '1;

  logic             prev_bit;
  logic             have_prev;
  logic [CNT_W-1:0] run_len;
  logic [CNT_W-1:0] run_len_nxt;
  logic             too_long;

  always_comb begin
    if (have_prev && bit_in == prev_bit)
      run_len_nxt = (run_len == CNT_MAX) ? run_len : run_len + 1'b1;
    else
      run_len_nxt = CNT_W'(1);
  end

  always_ff @(posedge clk) begin
    if (!rst_n || clr) begin
      prev_bit  <= 1'b0;
      have_prev <= 1'b0;
      run_len   <= '0;
      too_long  <= 1'b0;
      done      <= 1'b0;
    end else if (en && bit_valid && !done) begin
      prev_bit  <= bit_in;
      have_prev <= 1'b1;
      run_len   <= run_len_nxt;
      if (32'(run_len_nxt) >= MAX_RUN) too_long <= 1'b1;
      if (last) done <= 1'b1;
    end
  end

  assign pass = done && !too_long;

endmodule
