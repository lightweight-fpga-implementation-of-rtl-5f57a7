// fips_control: the monitor's control FSM and status encoder.
//
// One test cycle runs as follows:
//   1. `start` enables the RNG and the acquisition of an N-bit sample
//      (a 15-bit counter marks the sample's last bit);
//   2. during that sample only the low-power tests (monobit, runs, long run)
//      are enabled;
//   3. if all three pass, a second N-bit sample is acquired with the
//      high-power poker test enabled as well;
//   4. if that passes too, transfer is enabled: RNG bits are forwarded to the
//      host (xfer_bit/xfer_valid) and the status bus shows PASS. A new `start`
//      begins the next test cycle;
//   5. any failure raises `alarm`, puts a failure code on the status bus and
//      halts the FSM until reset.
// With `force_all` high at `start` (the worst-case measurement mode), all four
// tests run on the first sample and transfer follows it directly.
//
// `clr` is a one-cycle pulse, in the cycle before a sample starts, that clears
// the tests. `tst_valid`/`tst_last` carry the sample bits to the tests; bits
// are taken only in the acquisition states. `low_en`/`high_en` gate the tests
// so that a test that is not needed does not toggle. After the last bit the
// FSM waits for every enabled test's `done`.
//
// The status bus is registered. Its codes (fips_pkg::status_e) all have even
// weight, so only the single pass code 4'b1010 means pass and a one-bit fault
// on the bus cannot create it. When several tests fail at once the code
// names the first of monobit, runs, long run, poker.
//
// The order of the steps and the 4-bit bus with one pass code follow the
// document. Running the low-power tests again on the second sample, the
// `start` input, `force_all`, and the code assignment are this design's own.
module fips_control #(
  parameter int unsigned N_BITS = fips_pkg::N_BITS_DEFAULT,
  localparam int unsigned CW    = $clog2(N_BITS)
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  logic force_all,
  // RNG side
  output logic rng_en,
  input  logic rng_valid,
  input  logic rng_bit,
  // test side
  output logic clr,
  output logic low_en,
  output logic high_en,
  output logic tst_valid,
  output logic tst_bit,
  output logic tst_last,
  input  logic mono_done,
  input  logic mono_pass,
  input  logic runs_done,
  input  logic runs_pass,
  input  logic long_done,
  input  logic long_pass,
  input  logic poker_done,
  input  logic poker_pass,
  // host side
  output fips_pkg::status_e status,
  output logic alarm,
  output logic xfer_valid,
  output logic xfer_bit
);

  import fips_pkg::*;

  typedef enum logic [2:0] {
    S_IDLE, S_ACQ_LOW, S_WAIT_LOW, S_ACQ_HIGH, S_WAIT_HIGH, S_XFER, S_ALARM
  } state_e;

  state_e        state, state_nxt;
  logic [CW-1:0] bit_cnt;
  logic          all_mode;        // force_all latched at start
  status_e       fail_code, fail_code_nxt;
  logic          results_ready;
  logic          results_pass;
  logic          acq;

  assign acq       = (state == S_ACQ_LOW) || (state == S_ACQ_HIGH);
  assign rng_en    = acq || (state == S_XFER);
  assign tst_valid = acq && rng_valid;
  assign tst_bit   = rng_bit;
  assign tst_last  = tst_valid && (bit_cnt == CW'(N_BITS - 1));
  assign low_en    = (state == S_ACQ_LOW) || (state == S_WAIT_LOW) ||
                     (state == S_ACQ_HIGH) || (state == S_WAIT_HIGH);
  assign high_en   = (state == S_ACQ_HIGH) || (state == S_WAIT_HIGH) ||
                     (all_mode && ((state == S_ACQ_LOW) || (state == S_WAIT_LOW)));
  assign xfer_valid = (state == S_XFER) && rng_valid;
  assign xfer_bit   = rng_bit;
  assign alarm      = (state == S_ALARM);

  always_comb begin
    results_ready = mono_done && runs_done && long_done && (!high_en || poker_done);
    results_pass  = mono_pass && runs_pass && long_pass && (!high_en || poker_pass);
    if      (!mono_pass)            fail_code_nxt = ST_FAIL_MONO;
    else if (!runs_pass)            fail_code_nxt = ST_FAIL_RUNS;
    else if (!long_pass)            fail_code_nxt = ST_FAIL_LONG;
    else                            fail_code_nxt = ST_FAIL_POKER;
  end

  always_comb begin
    state_nxt = state;
    clr       = 1'b0;
    unique case (state)
      S_IDLE, S_XFER: if (start) begin
        state_nxt = S_ACQ_LOW;
        clr       = 1'b1;
      end
      S_ACQ_LOW:  if (tst_last) state_nxt = S_WAIT_LOW;
      S_WAIT_LOW: if (results_ready) begin
        if (!results_pass) state_nxt = S_ALARM;
        else if (all_mode) state_nxt = S_XFER;
        else begin
          state_nxt = S_ACQ_HIGH;
          clr       = 1'b1;
        end
      end
      S_ACQ_HIGH:  if (tst_last) state_nxt = S_WAIT_HIGH;
      S_WAIT_HIGH: if (results_ready) state_nxt = results_pass ? S_XFER : S_ALARM;
      S_ALARM:     ;                                // halt until reset
      default:     state_nxt = S_ALARM;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      bit_cnt   <= '0;
      all_mode  <= 1'b0;
      fail_code <= ST_FAIL_MONO;
      status    <= ST_IDLE;
    end else begin
      state <= state_nxt;
      if (clr)
        bit_cnt <= '0;
      else if (tst_valid)
        bit_cnt <= tst_last ? '0 : bit_cnt + 1'b1;
      if ((state == S_IDLE || state == S_XFER) && start) all_mode <= force_all;
      if (state_nxt == S_ALARM && state != S_ALARM) fail_code <= fail_code_nxt;
      unique case (state_nxt)
        S_IDLE:                  status <= ST_IDLE;
        S_ACQ_LOW, S_WAIT_LOW:   status <= ST_TEST_LOW;
        S_ACQ_HIGH, S_WAIT_HIGH: status <= ST_TEST_HIGH;
        S_XFER:                  status <= ST_PASS;
        default:                 status <= (state == S_ALARM) ? fail_code : fail_code_nxt;
      endcase
    end
  end

  // PASS is shown only while transfer is enabled.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (status == ST_PASS) |-> (state == S_XFER));
  // Once in alarm, stay there.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (state == S_ALARM) |=> (state == S_ALARM));

endmodule
