// tb_fips_control: self-checking testbench for fips_control with N = 64.
//
// The four tests are replaced by simple responders that raise `done` one
// cycle (poker: 18 cycles) after the sample's last bit, with a verdict chosen
// by the test scenario. Scenarios: both phases pass and transfer begins;
// restart from transfer; failure of each test in the low phase and in the
// high phase; several failures at once (priority of the code); force_all.
// Checks per phase: exactly N bits reach the tests, `tst_last` on the N-th,
// one `clr` pulse before each sample, which tests are enabled, the status
// code, `rng_en`, bits forwarded only in transfer, and that the alarm state
// ignores `start` until reset.
module tb_fips_control;
  import fips_pkg::*;

  localparam int N = 64;

  logic clk = 0, rst_n = 0, start = 0, force_all = 0;
  logic rng_en, rng_valid = 0, rng_bit = 0;
  logic clr, low_en, high_en, tst_valid, tst_bit, tst_last;
  logic mono_done = 0, mono_pass = 0, runs_done = 0, runs_pass = 0;
  logic long_done = 0, long_pass = 0, poker_done = 0, poker_pass = 0;
  status_e status;
  logic alarm, xfer_valid, xfer_bit;
  int checks = 0, failures = 0;

  fips_control #(.N_BITS(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200_000) @(posedge clk);
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

  // verdicts for the next sample: {poker, long, runs, mono}, 1 = pass
  logic [3:0] verdict = 4'hF;
  int poker_timer = 0;
  int n_bits = 0, n_last = 0, n_clr = 0;

  // test responders
  always_ff @(posedge clk) begin
    if (clr) begin
      {mono_done, runs_done, long_done, poker_done} <= '0;
      {mono_pass, runs_pass, long_pass, poker_pass} <= '0;
      poker_timer <= 0;
    end else begin
      if (tst_last && low_en) begin
        {mono_done, runs_done, long_done} <= 3'b111;
        {long_pass, runs_pass, mono_pass} <= verdict[2:0];
      end
      if (tst_last && high_en) poker_timer <= 18;
      if (poker_timer == 1) begin
        poker_done <= 1;
        poker_pass <= verdict[3];
      end
      if (poker_timer > 0) poker_timer <= poker_timer - 1;
    end
    if (tst_valid) n_bits <= n_bits + 1;
    if (tst_last)  n_last <= n_last + 1;
    if (clr)       n_clr  <= n_clr + 1;
  end

  // random source with gaps, only when enabled
  always @(negedge clk) begin
    rng_valid = rng_en && ($urandom % 3 != 0);
    rng_bit   = 1'($urandom);
  end

  // forwarded bits must equal the source bits
  always @(negedge clk) begin
    #1;
    if (xfer_valid) check(xfer_bit == rng_bit && status == ST_PASS, "forwarded bit in transfer");
  end

  task automatic do_reset();
    rst_n = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(status == ST_IDLE && !alarm && !rng_en, "idle after reset");
  endtask

  task automatic pulse_start(bit all);
    force_all = all; start = 1;
    @(negedge clk);
    start = 0; force_all = 0;
  endtask

  // Waits for one sample to be acquired and checks the phase's signals.
  task automatic one_phase(bit high, bit all);
    int b0 = n_bits, l0 = n_last;
    status_e st = high ? ST_TEST_HIGH : ST_TEST_LOW;
    check(status == st, $sformatf("status %b during phase", status));
    check(low_en && (high_en == (high || all)), "test enables");
    check(rng_en, "rng enabled while acquiring");
    while (n_last == l0) @(negedge clk);
    check(n_bits - b0 == N, $sformatf("%0d bits in the sample", n_bits - b0));
    check(!rng_en, "rng off while waiting for results");
  endtask

  task automatic wait_leave(status_e st);
    int t = 0;
    while (status == st && t < 100) begin
      t++;
      @(negedge clk);
    end
  endtask

  task automatic expect_alarm(status_e code);
    check(status == code && alarm, $sformatf("alarm code %b expected %b", status, code));
    pulse_start(0);
    repeat (5) @(negedge clk);
    check(status == code && alarm && !rng_en, "alarm holds until reset");
  endtask

  initial begin
    int c0;
    do_reset();

    // 1. both phases pass, then transfer, then restart
    verdict = 4'hF; c0 = n_clr;
    pulse_start(0);
    one_phase(0, 0);
    wait_leave(ST_TEST_LOW);
    one_phase(1, 0);
    wait_leave(ST_TEST_HIGH);
    check(status == ST_PASS && !alarm && rng_en, "transfer after both phases");
    check(n_clr - c0 == 2, "one clr per sample");
    repeat (50) @(negedge clk);
    check(status == ST_PASS, "transfer holds");
    pulse_start(0);
    one_phase(0, 0);
    wait_leave(ST_TEST_LOW);
    one_phase(1, 0);
    wait_leave(ST_TEST_HIGH);
    check(status == ST_PASS, "second test cycle passes");

    // 2. failures in the low phase
    foreach (verdict[k]) if (k < 3) begin
      do_reset();
      verdict = 4'hF; verdict[k] = 0;
      pulse_start(0);
      one_phase(0, 0);
      wait_leave(ST_TEST_LOW);
      expect_alarm(k == 0 ? ST_FAIL_MONO : k == 1 ? ST_FAIL_RUNS : ST_FAIL_LONG);
    end

    // 3. several failures at once: runs before long run
    do_reset();
    verdict = 4'b1001;
    pulse_start(0);
    one_phase(0, 0);
    wait_leave(ST_TEST_LOW);
    expect_alarm(ST_FAIL_RUNS);

    // 4. poker fails in the high phase
    do_reset();
    verdict = 4'hF;
    pulse_start(0);
    one_phase(0, 0);
    wait_leave(ST_TEST_LOW);
    verdict = 4'b0111;
    one_phase(1, 0);
    wait_leave(ST_TEST_HIGH);
    expect_alarm(ST_FAIL_POKER);

    // 5. a low-power test fails in the high phase
    do_reset();
    verdict = 4'hF;
    pulse_start(0);
    one_phase(0, 0);
    wait_leave(ST_TEST_LOW);
    verdict = 4'b1110;
    one_phase(1, 0);
    wait_leave(ST_TEST_HIGH);
    expect_alarm(ST_FAIL_MONO);

    // 6. force_all: one sample with all four tests, then transfer
    do_reset();
    verdict = 4'hF; c0 = n_clr;
    pulse_start(1);
    one_phase(0, 1);
    wait_leave(ST_TEST_LOW);
    check(status == ST_PASS && n_clr - c0 == 1, "force_all goes to transfer after one sample");

    // 7. force_all with poker failing
    do_reset();
    verdict = 4'b0111;
    pulse_start(1);
    one_phase(0, 1);
    wait_leave(ST_TEST_LOW);
    expect_alarm(ST_FAIL_POKER);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
