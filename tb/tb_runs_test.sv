// tb_runs_test: self-checking testbench for runs_test at N = 20000.
//
// Runs random samples (which pass), biased samples, samples with long runs,
// periodic patterns (which fail), and samples whose first or last bit forms a
// run of its own, with and without idle cycles between bits. For each it
// compares all twelve run counters and `pass` with the software reference.
module tb_runs_test;
  import fips_ref_pkg::*;

  localparam int N = 20000;

  logic clk = 0, rst_n = 0, en = 1, clr = 0, bit_valid = 0, bit_in = 0, last = 0;
  logic done, pass;
  logic [11:0] counts [2][6];
  int checks = 0, failures = 0;
  int n_pass = 0, n_fail = 0;

  runs_test dut (.*);

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

  task automatic run(sample_t s, bit gaps);
    int rc [2][6];
    int mr;
    bit exp = ref_runs_pass(s);
    ref_runs(s, rc, mr);
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
    check(done, "done after last bit");
    foreach (rc[p, l])
      check(int'(counts[p][l]) == (rc[p][l] > 4095 ? 4095 : rc[p][l]),
            $sformatf("count[%0d][%0d] = %0d expected %0d", p, l, counts[p][l], rc[p][l]));
    check(pass == exp, $sformatf("pass=%0b expected %0b", pass, exp));
    if (exp) n_pass++; else n_fail++;
  endtask

  initial begin
    sample_t s;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(gen_random(N), 0);
    run(gen_random(N), 1);
    run(gen_random(N), 0);
    run(gen_biased(N, 560), 0);
    run(gen_pattern(N, 4'b0011), 0);
    run(gen_pattern(N, 4'b0101), 0);       // 20000 runs of length 1: saturation
    run(gen_with_run(N, 30, 1, 100), 1);
    s = gen_random(N); s[N-1] = !s[N-2];  // last bit is a run of one
    run(s, 0);
    s = gen_random(N); s[0] = !s[1];      // first bit is a run of one
    run(s, 0);
    check(n_pass >= 2 && n_fail >= 3, "both verdicts exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
