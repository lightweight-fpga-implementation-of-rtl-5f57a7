// tb_lfsr_rng: self-checking testbench for lfsr_rng.
//
// Collects the output bit stream with random pauses of `en` and checks:
// the first 32 bits are the seed, MSB first; every later bit obeys the
// recurrence o[t+32] = o[t] ^ o[t+10] ^ o[t+30] ^ o[t+31] of the polynomial
// x^32 + x^22 + x^2 + x + 1; the output holds while `en` is low; `valid`
// follows `en` by one cycle; and a 20000-bit stretch is balanced enough to
// pass the monobit interval.
module tb_lfsr_rng;
  localparam logic [31:0] SEED = 32'hACE1_2468;

  logic clk = 0, rst_n = 0, en = 0;
  logic bit_out, valid;
  int checks = 0, failures = 0;
  bit o [$];

  lfsr_rng #(.SEED(SEED)) dut (.*);

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
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    int ones;
    logic prev_en;
    repeat (2) @(negedge clk);
    rst_n = 1;
    while (o.size() < 20000) begin
      logic b;
      b = bit_out;
      prev_en = en;
      en = ($urandom % 5 != 0);
      if (en) o.push_back(b);
      @(negedge clk);
      check(valid == en, "valid follows en");
      if (!en) check(bit_out == b, "output holds while disabled");
    end
    ones = 0;
    for (int i = 0; i < 32; i++) check(o[i] == SEED[31 - i], "seed bits first");
    for (int t = 0; t + 32 < o.size(); t++)
      check(o[t+32] == (o[t] ^ o[t+10] ^ o[t+30] ^ o[t+31]), $sformatf("recurrence at %0d", t));
    foreach (o[i]) ones += o[i];
    check(ones > 9725 && ones < 10275, $sformatf("balance: %0d ones", ones));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
