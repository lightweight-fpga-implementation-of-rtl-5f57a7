// tb_poker_test: self-checking testbench for poker_test at N = 20000, m = 4.
//
// Drives random samples, samples skewed towards two block values, constant
// samples (all blocks equal: the largest possible sum) and samples built to
// land exactly on either side of both bounds of 2.16 < X < 46.17
// (sum(n_i^2) = 1563174 / 1563176 and 1576928 / 1576930). Compares `sum`
// with the reference sum(n_i^2) and `pass` with the reference X computed in
// floating point, and checks that `done` rises 18 cycles after the last bit.
// Back-to-back samples check that the written-word flags clear the tables.
module tb_poker_test;
  import fips_ref_pkg::*;

  localparam int N       = 20000;
  localparam int LATENCY = 18;

  logic clk = 0, rst_n = 0, en = 1, clr = 0, bit_valid = 0, bit_in = 0, last = 0;
  logic done, pass;
  logic [24:0] sum;
  int checks = 0, failures = 0;
  int n_pass = 0, n_fail = 0;

  poker_test dut (.*);

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
      $display("FAIL: %s", what);
    end
  endtask

  task automatic run(sample_t s, bit gaps, string name);
    longint es = ref_poker_sum(s);
    bit     ep = ref_poker_pass(s);
    int     lat = 0;
    @(negedge clk) clr = 1;
    @(negedge clk) clr = 0;
    foreach (s[i]) begin
      while (gaps && ($urandom % 4 == 0)) begin
        bit_valid = 0;
        @(negedge clk);
      end
      bit_valid = 1; bit_in = s[i]; last = (i == s.size() - 1);
      @(negedge clk);
    end
    bit_valid = 0; last = 0;
    while (!done && lat < 100) begin
      lat++;
      @(negedge clk);
    end
    check(lat == LATENCY, $sformatf("%s: latency %0d expected %0d", name, lat, LATENCY));
    check(longint'(sum) == es, $sformatf("%s: sum %0d expected %0d", name, sum, es));
    check(pass == ep, $sformatf("%s: pass=%0b expected %0b (X=%f)", name, pass, ep, ref_poker_x(s)));
    $display("%s: X=%f pass=%0b", name, ref_poker_x(s), pass);
    if (ep) n_pass++; else n_fail++;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(gen_random(N), 0, "random");
    run(gen_random(N), 1, "random gaps");
    run(gen_poker_skew(N, 150), 0, "skewed");
    run(gen_pattern(N, 4'b1011), 0, "constant");
    run(gen_pattern(N, 4'b0000), 1, "zeros");
    run(gen_poker_sum(N, 1563174), 0, "S=1563174");
    run(gen_poker_sum(N, 1563176), 0, "S=1563176");
    run(gen_poker_sum(N, 1576928), 1, "S=1576928");
    run(gen_poker_sum(N, 1576930), 0, "S=1576930");
    run(gen_random(N), 0, "random after");
    check(n_pass >= 4 && n_fail >= 5, $sformatf("both verdicts exercised (%0d pass, %0d fail)", n_pass, n_fail));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
