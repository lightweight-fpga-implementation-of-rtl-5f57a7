// poker_ram: simple dual-port RAM with one write port and one synchronous
// read port, as used for the poker test's two 2^m-word tables (n_i and n_i^2).
//
// A write takes effect at the clock edge when `we` is high. A read returns
// mem[raddr] one cycle after `re`; the output holds otherwise. Reading an
// address in the same cycle it is written returns the old word. The contents
// are not reset (like a block or LUT RAM); the poker test keeps its own
// per-word "written since clear" flags instead.
//
// The document asks for two 2^m-word block RAMs; the port arrangement and the
// synchronous read are this design's choice.
module poker_ram #(
  parameter int unsigned DEPTH = 16,
  parameter int unsigned WIDTH = 13,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic             re,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end

endmodule
