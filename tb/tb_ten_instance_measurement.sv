// tb_ten_instance_measurement: the power-measurement workload. Ten monitors,
// each fed by its own internal LFSR (distinct seeds), run side by side at the
// default 20000-bit sample size.
//
// Round 1 uses the worst-case mode (force_all: all four tests on the first
// sample). Round 2 restarts every monitor from transfer in the normal
// two-phase mode. For each instance and sample the bits consumed by the tests
// are captured and evaluated by the software reference, and the status that
// follows is compared with the prediction. Once in transfer, each instance
// must stream random bits on xfer_valid and report PASS. Counts how many
// instances reached transfer in each round.
module tb_ten_instance_measurement;
  import fips_pkg::*;
  import fips_ref_pkg::*;

  localparam int NINST = 10;
  localparam int N     = 20000;

  logic clk = 0, rst_n = 0, start = 0, force_all = 0;
  status_e     status [NINST];
  logic        alarm [NINST], xfer_valid [NINST];
  int checks = 0, failures = 0;
  int phases_done [NINST];
  int xfer_count [NINST];
  int passed_round [2];

  always #5 clk = ~clk;

  initial begin
    repeat (400_000) @(posedge clk);
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

  for (genvar g = 0; g < NINST; g++) begin : inst
    logic rng_en, xfer_bit;
    logic [24:0] poker_sum;
    bit cap [$];       // bits of the sample being acquired
    bit done_s [$];    // the last complete sample
    bit poker_on, done_poker;

    fips140_monitor #(.LFSR_SEED(32'h1357_9BDF * (g + 1) + 32'h0F0F_0001)) dut (
      .clk, .rst_n, .start, .force_all, .src_sel(1'b1),
      .trng_bit(1'b0), .trng_valid(1'b0), .rng_en, .status(status[g]),
      .alarm(alarm[g]), .xfer_bit, .xfer_valid(xfer_valid[g]), .poker_sum
    );

    always @(posedge clk) begin
      if (dut.clr) begin
        cap.delete();
        poker_on = 0;
      end
      if (dut.tst_valid) begin
        cap.push_back(dut.tst_bit);
        if (dut.high_en) poker_on = 1;
      end
      if (dut.tst_last) begin
        done_s = cap;
        done_poker = poker_on;
      end
      if (xfer_valid[g]) xfer_count[g]++;
    end

    // predict and check the status that follows each sample
    always @(status[g]) begin
      sample_t s;
      status_e exp;
      if (rst_n && done_s.size() == N && status[g] != ST_TEST_LOW && status[g] != ST_IDLE) begin
        s = new[N];
        foreach (s[i]) s[i] = done_s[i];
        if      (!ref_mono_pass(s))                exp = ST_FAIL_MONO;
        else if (!ref_runs_pass(s))                exp = ST_FAIL_RUNS;
        else if (!ref_long_pass(s))                exp = ST_FAIL_LONG;
        else if (done_poker && !ref_poker_pass(s)) exp = ST_FAIL_POKER;
        else if (done_poker)                       exp = ST_PASS;
        else                                       exp = ST_TEST_HIGH;
        check(status[g] == exp, $sformatf("instance %0d: status %b expected %b", g, status[g], exp));
        check(longint'(poker_sum) == ref_poker_sum(s) || !done_poker, "poker sum");
        phases_done[g]++;
        done_s.delete();
      end
    end
  end

  task automatic wait_all_settled();
    int t = 0;
    bit busy = 1;
    while (busy && t < 200_000) begin
      @(negedge clk);
      t++;
      busy = 0;
      foreach (status[i]) if (status[i] inside {ST_TEST_LOW, ST_TEST_HIGH}) busy = 1;
    end
    check(!busy, "all instances settled");
  endtask

  initial begin
    int x0 [NINST];
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    // round 1: worst case, all tests enabled on the first sample
    force_all = 1; start = 1;
    @(negedge clk);
    force_all = 0; start = 0;
    wait_all_settled();
    foreach (status[i]) if (status[i] == ST_PASS) passed_round[0]++;
    foreach (x0[i]) x0[i] = xfer_count[i];
    repeat (2000) @(negedge clk);
    foreach (status[i])
      if (status[i] == ST_PASS)
        check(xfer_count[i] - x0[i] > 1000 && !alarm[i], $sformatf("instance %0d streams bits", i));
      else
        check(alarm[i] && xfer_count[i] == x0[i], $sformatf("instance %0d halted", i));

    // round 2: normal two-phase cycle, restarted from transfer
    start = 1;
    @(negedge clk);
    start = 0;
    wait_all_settled();
    foreach (status[i]) if (status[i] == ST_PASS) passed_round[1]++;

    $display("instances in transfer: worst-case round %0d of %0d, normal round %0d of %0d",
             passed_round[0], NINST, passed_round[1], NINST);
    check(passed_round[0] > 0 && passed_round[1] > 0, "some instances reached transfer");
    foreach (phases_done[i]) check(phases_done[i] == 3, $sformatf("instance %0d verdicts", i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
