// fips_pkg: constants and types shared by the FIPS 140-2 online monitor.
//
// The sample size (20000 bits) and the pass intervals of the monobit, runs
// and long-run tests are the ones the design is built around. The poker
// bounds 2.16 < X < 46.17 are the FIPS 140-2 values; the design folds the
// scaling of X into two integer bounds on sum(n_i^2) so that no multiplier
// or divider is needed at run time (see poker_test).
//
// The 4-bit status codes are this design's own choice. Every code has an even
// number of ones, so each non-pass code differs from the single pass code
// 4'b1010 in at least two bits: no single flipped status wire can turn a
// failure or a busy state into "pass".
package fips_pkg;

  localparam int unsigned N_BITS_DEFAULT = 20000;

  // Monobit: open interval on the number of ones.
  localparam int unsigned MONO_LO = 9725;
  localparam int unsigned MONO_HI = 10275;

  // Runs: open interval per run length 1..5 and 6-or-longer, same for 0s and 1s.
  localparam int unsigned RUNS_LEN = 6;
  localparam int unsigned RUNS_LO [RUNS_LEN] = '{2315, 1114, 527, 240, 103, 103};
  localparam int unsigned RUNS_HI [RUNS_LEN] = '{2685, 1386, 723, 384, 209, 209};

  // Long run: a run of this length or longer fails.
  localparam int unsigned LONG_RUN_MAX = 26;

  // Status bus codes.
  typedef enum logic [3:0] {
    ST_IDLE       = 4'b0000,
    ST_TEST_LOW   = 4'b0011,  // acquiring with the low-power tests
    ST_TEST_HIGH  = 4'b0101,  // acquiring with the poker test added
    ST_FAIL_MONO  = 4'b0110,
    ST_FAIL_RUNS  = 4'b1001,
    ST_PASS       = 4'b1010,  // the only code that means "pass"
    ST_FAIL_LONG  = 4'b1100,
    ST_FAIL_POKER = 4'b1111
  } status_e;

endpackage
