// tb_poker_ram: self-checking testbench for poker_ram (16 x 25 bits).
//
// Writes random words to random addresses while reading others, keeping a
// shadow copy, and checks: read data appears one cycle after `re`, holds
// while `re` is low, and a read of the address being written returns the old
// word.
module tb_poker_ram;
  localparam int DEPTH = 16, WIDTH = 25;

  logic clk = 0, we = 0, re = 0;
  logic [3:0] waddr = 0, raddr = 0;
  logic [WIDTH-1:0] wdata = 0, rdata;
  logic [WIDTH-1:0] shadow [DEPTH];
  int checks = 0, failures = 0;

  poker_ram #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100_000) @(posedge clk);
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
    logic [WIDTH-1:0] expected, held;
    // fill
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk) we = 1; waddr = 4'(a); wdata = WIDTH'($urandom); shadow[a] = wdata;
    end
    @(negedge clk) we = 0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      we = 1'($urandom); waddr = 4'($urandom); wdata = WIDTH'($urandom);
      re = 1'($urandom); raddr = ($urandom % 3 == 0) ? waddr : 4'($urandom);
      expected = shadow[raddr];   // old word, even when raddr == waddr
      held = rdata;
      @(posedge clk);
      if (we) shadow[waddr] = wdata;
      @(negedge clk);
      if (re) check(rdata == expected, $sformatf("read %0d: %h expected %h", raddr, rdata, expected));
      else    check(rdata == held, "output held without re");
      we = 0; re = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
