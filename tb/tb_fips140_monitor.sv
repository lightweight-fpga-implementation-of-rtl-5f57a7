// tb_fips140_monitor: end-to-end testbench of the whole monitor, at its
// default parameters (20000-bit samples).
//
// The bits the tests actually consume are captured at the control/test
// boundary; when a sample ends, the software reference evaluates all four
// tests on it and predicts the next status code (next phase, PASS, or the
// failure code with its priority), which is compared with the status bus,
// together with `alarm`, the poker sum and the verdict latency (1 cycle
// after the last bit for the low phase, 19 when the poker test runs).
//
// Scenarios, each counted as a mechanism that must occur at least once:
// low phase passing into the high phase; transfer (forwarded bits compared
// with the source); restart from transfer; an alarm from each of the four
// tests, the poker one from a sample that passes the three cheap tests;
// alarm holding against `start` until reset; force_all; the internal LFSR
// source; an external source with idle cycles.
module tb_fips140_monitor;
  import fips_pkg::*;
  import fips_ref_pkg::*;

  localparam int N = 20000;

  logic clk = 0, rst_n = 0, start = 0, force_all = 0, src_sel = 0;
  logic trng_bit = 0, trng_valid = 0;
  logic rng_en, alarm, xfer_bit, xfer_valid;
  status_e status;
  logic [24:0] poker_sum;
  int checks = 0, failures = 0;

  fips140_monitor dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // ---- mechanisms ------------------------------------------------------
  typedef enum int {M_LOW_TO_HIGH, M_TRANSFER, M_RESTART, M_ALARM_MONO, M_ALARM_RUNS,
                    M_ALARM_LONG, M_ALARM_POKER, M_HALT, M_FORCE_ALL, M_LFSR,
                    M_EXT_GAPS, M_COUNT} mech_e;
  int mech [M_COUNT];

  // ---- external source -------------------------------------------------
  bit feed [$];          // bits still to deliver; random bits when empty
  bit gaps = 1;
  bit xfer_expect [$];   // bits offered while in transfer

  always @(negedge clk) begin
    trng_valid = rng_en && !src_sel && (!gaps || ($urandom % 4 != 0));
    trng_bit   = (feed.size() > 0) ? feed[0] : 1'($urandom);
  end

  // capture of consumed bits
  bit cap [$];
  int last_edge = 0, cycle = 0;
  always @(posedge clk) begin
    cycle++;
    if (dut.tst_valid) cap.push_back(dut.tst_bit);
    if (dut.tst_last)  last_edge = cycle;
    if (trng_valid && rng_en && !src_sel && feed.size() > 0) void'(feed.pop_front());
    if (trng_valid && rng_en && !src_sel && gaps) mech[M_EXT_GAPS]++;
    if (xfer_valid) check(xfer_bit == (src_sel ? dut.u_lfsr.bit_out : trng_bit), "forwarded bit");
  end

  task automatic do_reset();
    rst_n = 0; feed.delete();
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(status == ST_IDLE && !alarm, "idle after reset");
  endtask

  task automatic pulse_start(bit all);
    force_all = all; start = 1;
    @(negedge clk);
    start = 0; force_all = 0;
  endtask

  // Waits for the current sample to end, predicts the outcome, checks it.
  task automatic phase(bit poker_on, bit more_after);
    status_e cur = status;
    status_e exp;
    sample_t s;
    int lat;
    cap.delete();
    while (status == cur) @(negedge clk);
    lat = cycle - last_edge;
    s = new[cap.size()];
    foreach (s[i]) s[i] = cap[i];
    check(s.size() == N, $sformatf("sample of %0d bits", s.size()));
    if      (!ref_mono_pass(s))               exp = ST_FAIL_MONO;
    else if (!ref_runs_pass(s))               exp = ST_FAIL_RUNS;
    else if (!ref_long_pass(s))               exp = ST_FAIL_LONG;
    else if (poker_on && !ref_poker_pass(s))  exp = ST_FAIL_POKER;
    else                                      exp = more_after ? ST_TEST_HIGH : ST_PASS;
    check(status == exp, $sformatf("status %b expected %b", status, exp));
    check(alarm == (exp != ST_TEST_HIGH && exp != ST_PASS), "alarm");
    check(lat == (poker_on ? 19 : 1), $sformatf("verdict latency %0d", lat));
    if (poker_on) check(longint'(poker_sum) == ref_poker_sum(s), "poker sum");
    case (status)
      ST_TEST_HIGH:  mech[M_LOW_TO_HIGH]++;
      ST_PASS:       mech[M_TRANSFER]++;
      ST_FAIL_MONO:  mech[M_ALARM_MONO]++;
      ST_FAIL_RUNS:  mech[M_ALARM_RUNS]++;
      ST_FAIL_LONG:  mech[M_ALARM_LONG]++;
      ST_FAIL_POKER: mech[M_ALARM_POKER]++;
      default: ;
    endcase
  endtask

  task automatic check_halt();
    status_e code = status;
    pulse_start(0);
    repeat (100) @(negedge clk);
    check(status == code && alarm && !rng_en && !xfer_valid, "alarm holds until reset");
    mech[M_HALT]++;
  endtask

  task automatic check_transfer(int nbits);
    int seen = 0;
    while (seen < nbits) begin
      @(negedge clk);
      if (xfer_valid) seen++;
      check(status == ST_PASS, "PASS during transfer");
    end
  endtask

  function automatic void push(sample_t s);
    foreach (s[i]) feed.push_back(s[i]);
  endfunction

  // Random sample that passes the three cheap tests but fails poker.
  function automatic sample_t poker_only_fail();
    sample_t s;
    for (int k = 0; k < 100; k++) begin
      s = gen_poker_skew(N, 120);
      if (ref_mono_pass(s) && ref_runs_pass(s) && ref_long_pass(s) && !ref_poker_pass(s))
        return s;
    end
    return s;
  endfunction

  initial begin
    repeat (2) @(negedge clk);

    // 1. internal LFSR source: both phases, transfer, restart
    src_sel = 1;
    do_reset();
    pulse_start(0);
    phase(0, 1);
    phase(1, 0);
    mech[M_LFSR]++;
    check_transfer(500);
    pulse_start(0);
    mech[M_RESTART]++;
    phase(0, 1);
    phase(1, 0);

    // 2. external source, good samples, then a poker-only failure after restart
    src_sel = 0;
    do_reset();
    push(gen_random(N)); push(gen_random(N));
    pulse_start(0);
    phase(0, 1);
    phase(1, 0);
    check_transfer(300);
    feed.delete();
    push(gen_random(N)); push(poker_only_fail());
    pulse_start(0);
    mech[M_RESTART]++;
    phase(0, 1);
    phase(1, 0);
    check_halt();

    // 3. each cheap test failing in the low phase
    do_reset();
    push(gen_biased(N, 540));
    pulse_start(0);
    phase(0, 1);
    check_halt();
    do_reset();
    push(gen_pattern(N, 4'b0011));
    pulse_start(0);
    phase(0, 1);
    check_halt();
    do_reset();
    push(gen_with_run(N, 30, 0, 12345));
    pulse_start(0);
    phase(0, 1);
    check_halt();

    // 4. force_all: all four tests on the first sample
    do_reset();
    push(gen_random(N));
    pulse_start(1);
    phase(1, 0);
    mech[M_FORCE_ALL]++;
    check_transfer(100);
    do_reset();
    push(poker_only_fail());
    pulse_start(1);
    phase(1, 0);
    mech[M_FORCE_ALL]++;
    check_halt();

    foreach (mech[m]) begin
      check(mech[m] > 0, $sformatf("mechanism %s never happened", mech_e'(m)));
      $display("mechanism %-14s : %0d", mech_e'(m), mech[m]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
