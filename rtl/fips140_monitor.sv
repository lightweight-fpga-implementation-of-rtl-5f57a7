// fips140_monitor: lightweight online monitor for a random number generator,
// running the four FIPS 140-2 statistical tests on 20000-bit samples.
//
// Structure: the control FSM (fips_control) counts samples and decides; the
// three cheap tests (monobit_test, runs_test, long_run_test) run on every
// sample; the poker test (poker_test, with its two small RAMs) is enabled
// only once the cheap tests have passed, so that the costly part is idle most
// of the time. Random bits reach the host (xfer_bit/xfer_valid) only after a
// sample has passed the cheap tests and the next one has passed all four.
// Results go out on a 4-bit status bus (pass is the single code 4'b1010)
// and on `alarm`, which holds until reset.
//
// Bit source: `src_sel` = 0 takes bits from an external TRNG (trng_bit with
// trng_valid, enabled by rng_en); `src_sel` = 1 takes them from the internal
// LFSR (lfsr_rng), the source used for power measurement. `src_sel` should
// only change while the monitor is idle.
//
// Timing: one bit per cycle at most. A test cycle takes 2 x 20000 bits plus a
// few cycles for the cheap-test verdict and 2^4 + 3 cycles for the poker
// verdict. Reset is synchronous, active low.
//
// The partition into low- and high-power tests, the control sequence and the
// status bus follow the document; the source selection is this design's own.
module fips140_monitor #(
  parameter int unsigned N_BITS    = fips_pkg::N_BITS_DEFAULT,
  parameter logic [31:0] LFSR_SEED = 32'hACE1_2468,
  localparam int unsigned SW       = $clog2((N_BITS / 4) * (N_BITS / 4) + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic              force_all,
  input  logic              src_sel,
  input  logic              trng_bit,
  input  logic              trng_valid,
  output logic              rng_en,
  output fips_pkg::status_e status,
  output logic              alarm,
  output logic              xfer_bit,
  output logic              xfer_valid,
  output logic [SW-1:0]     poker_sum
);

  logic lfsr_bit, lfsr_valid;
  logic rng_bit, rng_valid;
  logic clr, low_en, high_en, tst_valid, tst_bit, tst_last;
  logic mono_done, mono_pass, runs_done, runs_pass;
  logic long_done, long_pass, poker_done, poker_pass;

  lfsr_rng #(.SEED(LFSR_SEED)) u_lfsr (
    .clk, .rst_n, .en(rng_en && src_sel), .bit_out(lfsr_bit), .valid(lfsr_valid)
  );

  assign rng_bit   = src_sel ? lfsr_bit   : trng_bit;
  assign rng_valid = src_sel ? lfsr_valid : trng_valid;

  fips_control #(.N_BITS(N_BITS)) u_ctrl (
    .clk, .rst_n, .start, .force_all,
    .rng_en, .rng_valid, .rng_bit,
    .clr, .low_en, .high_en, .tst_valid, .tst_bit, .tst_last,
    .mono_done, .mono_pass, .runs_done, .runs_pass,
    .long_done, .long_pass, .poker_done, .poker_pass,
    .status, .alarm, .xfer_valid, .xfer_bit
  );

  monobit_test u_mono (
    .clk, .rst_n, .en(low_en), .clr, .bit_valid(tst_valid), .bit_in(tst_bit),
    .last(tst_last), .done(mono_done), .pass(mono_pass), .ones()
  );

  runs_test u_runs (
    .clk, .rst_n, .en(low_en), .clr, .bit_valid(tst_valid), .bit_in(tst_bit),
    .last(tst_last), .done(runs_done), .pass(runs_pass), .counts()
  );

  long_run_test u_long (
    .clk, .rst_n, .en(low_en), .clr, .bit_valid(tst_valid), .bit_in(tst_bit),
    .last(tst_last), .done(long_done), .pass(long_pass)
  );

  poker_test #(.N_BITS(N_BITS)) u_poker (
    .clk, .rst_n, .en(high_en), .clr, .bit_valid(tst_valid), .bit_in(tst_bit),
    .last(tst_last), .done(poker_done), .pass(poker_pass), .sum(poker_sum)
  );

endmodule
