// tb_long_run_test: self-checking testbench for long_run_test at N = 20000.
//
// Inserts runs of 25, 26 and 40 equal bits (0s and 1s) at the start, middle
// and end of random samples, plus a constant sample, and compares `pass`
// with the longest run found by the software reference. Checks that the
// verdict comes one cycle after the last bit.
module tb_long_run_test;
  import fips_ref_pkg::*;

  localparam int N = 20000;

  logic clk = 0, rst_n = 0, en = 1, clr = 0, bit_valid = 0, bit_in = 0, last = 0;
  logic done, pass;
  int checks = 0, failures = 0;
  int n_pass = 0, n_fail = 0;

  long_run_test dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2_000_000) @(posedge clk);
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
    bit exp = ref_long_pass(s);
    @(negedge clk) clr = 1;
    @(negedge clk) clr = 0;
    foreach (s[i]) begin
      while (gaps && ($urandom % 4 == 0)) begin
        bit_valid = 0;
        @(negedge clk);
      end
      bit_valid = 1; bit_in = s[i]; last = (i == s.size() - 1);
      @(negedge clk);
      check(done == last, "done one cycle after last bit");
    end
    bit_valid = 0; last = 0;
    check(pass == exp, $sformatf("pass=%0b expected %0b", pass, exp));
    if (exp) n_pass++; else n_fail++;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(gen_with_run(N, 25, 1, 5000), 0);
    run(gen_with_run(N, 26, 1, 5000), 0);
    run(gen_with_run(N, 25, 0, 0), 1);
    run(gen_with_run(N, 26, 0, 0), 0);
    run(gen_with_run(N, 26, 1, N - 26), 0);
    run(gen_with_run(N, 25, 0, N - 25), 0);
    run(gen_with_run(N, 40, 0, 777), 0);
    run(gen_random(N), 1);
    run(gen_pattern(N, 4'b0000), 0);
    check(n_pass >= 3 && n_fail >= 4, "both verdicts exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
