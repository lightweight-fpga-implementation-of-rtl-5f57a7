// tb_monobit_test: self-checking testbench for monobit_test at N = 20000.
//
// Drives samples with an exact number of ones around both interval bounds
// (9725/9726, 10274/10275), an all-ones sample (counter saturation), biased
// and random samples, some with idle cycles between bits, and compares ones,
// done and pass with the software reference. Also checks that `en` low
// freezes the test and that the verdict comes one cycle after the last bit.
module tb_monobit_test;
  import fips_ref_pkg::*;

  localparam int N = 20000;

  logic clk = 0, rst_n = 0, en = 1, clr = 0, bit_valid = 0, bit_in = 0, last = 0;
  logic done, pass;
  logic [13:0] ones;
  int checks = 0, failures = 0;

  monobit_test dut (.*);

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
    int exp_ones = ref_ones(s);
    @(negedge clk) clr = 1;
    @(negedge clk) clr = 0;
    foreach (s[i]) begin
      while (gaps && ($urandom % 4 == 0)) begin
        bit_valid = 0;
        @(negedge clk);
      end
      bit_valid = 1; bit_in = s[i]; last = (i == s.size() - 1);
      @(negedge clk);
      check(done == last, "done exactly one cycle after last bit");
    end
    bit_valid = 0; last = 0;
    check(done, "done held");
    check(pass == ref_mono_pass(s), $sformatf("pass for ones=%0d", exp_ones));
    check(int'(ones) == (exp_ones > 16383 ? 16383 : exp_ones),
          $sformatf("ones %0d vs %0d", ones, exp_ones));
    // extra bits after done are ignored
    bit_valid = 1; bit_in = 1;
    @(negedge clk) bit_valid = 0;
    check(int'(ones) == (exp_ones > 16383 ? 16383 : exp_ones), "ones frozen after done");
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(gen_ones(N, 9725), 0);
    run(gen_ones(N, 9726), 0);
    run(gen_ones(N, 10274), 1);
    run(gen_ones(N, 10275), 0);
    run(gen_ones(N, N), 0);
    run(gen_biased(N, 530), 0);
    run(gen_random(N), 1);
    run(gen_random(N), 0);
    // enable low: the counter must not move
    @(negedge clk) clr = 1;
    @(negedge clk) clr = 0; en = 0;
    repeat (10) begin bit_valid = 1; bit_in = 1; @(negedge clk); end
    bit_valid = 0;
    check(ones == 0 && !done, "disabled test holds");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
