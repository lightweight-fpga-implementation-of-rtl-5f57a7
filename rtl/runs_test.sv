// runs_test: FIPS 140-2 runs test on one N-bit sample.
//
// A run is a maximal stretch of equal bits. Twelve counters count the runs of
// 0s and of 1s of length 1, 2, 3, 4, 5 and 6-or-more. A 3-bit register holds
// the length of the current run (saturating at 6); when the bit changes, the
// run that just ended is counted, and on the `last` bit the run still open is
// counted too (both can happen in one cycle, always into counters of opposite
// polarity). The sample passes if every counter lies strictly inside its
// interval (fips_pkg::RUNS_LO/RUNS_HI).
//
// The counters are CNT_W = 12 bits wide and saturate; the largest upper bound
// (2685) is below 4095, so saturation never changes the verdict.
//
// Interface and timing are those of monobit_test: `done` and `pass` are valid
// from the cycle after the `last` bit until the next `clr`.
//
// The 12 counters and the intervals follow the document; the counter width,
// saturation and the run-length register are this design's choice.
module runs_test #(
  parameter int unsigned CNT_W = 12
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
  // counts[polarity][length-1], for observation
  output logic [CNT_W-1:0] counts [2][fips_pkg::RUNS_LEN]
);

  import fips_pkg::*;

  localparam logic [CNT_W-1:0] CNT_MAX = '1;

  logic       prev_bit;
  logic       have_prev;
  logic [2:0] run_len;      // 1..6, 6 meaning "6 or more"
  logic [2:0] run_len_nxt;
  logic       close_old;    // the run of prev_bit ended before this bit
  logic       close_new;    // the run containing this bit ends with the sample

  always_comb begin
    close_old   = have_prev && (bit_in != prev_bit);
    close_new   = last;
    if (have_prev && bit_in == prev_bit)
      run_len_nxt = (run_len == 3'(RUNS_LEN)) ? run_len : run_len + 3'd1;
    else
      run_len_nxt = 3'd1;
  end

  always_ff @(posedge clk) begin
    if (!rst_n || clr) begin
      prev_bit  <= 1'b0;
      have_prev <= 1'b0;
      run_len   <= 3'd0;
      done      <= 1'b0;
      for (int p = 0; p < 2; p++)
        for (int l = 0; l < RUNS_LEN; l++)
          counts[p][l] <= '0;
    end else if (en && bit_valid && !done) begin
      prev_bit  <= bit_in;
      have_prev <= 1'b1;
      run_len   <= run_len_nxt;
      if (last) done <= 1'b1;
      for (int p = 0; p < 2; p++)
        for (int l = 0; l < RUNS_LEN; l++)
          if (((close_old && p == int'(prev_bit) && l == int'(run_len) - 1) ||
               (close_new && p == int'(bit_in)   && l == int'(run_len_nxt) - 1)) &&
              counts[p][l] != CNT_MAX)
            counts[p][l] <= counts[p][l] + 1'b1;
    end
  end

  always_comb begin
    pass = done;
    for (int p = 0; p < 2; p++)
      for (int l = 0; l < RUNS_LEN; l++)
        if (!(32'(counts[p][l]) > RUNS_LO[l] && 32'(counts[p][l]) < RUNS_HI[l]))
          pass = 1'b0;
  end

endmodule
