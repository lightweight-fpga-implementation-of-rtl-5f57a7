// poker_test: FIPS 140-2 poker test (m = 4) computed without a multiplier.
//
// The sample is cut into N/m blocks of m bits (the first bit of a block is its
// most significant bit). For each block value i the test needs n_i, the number
// of occurrences, and finally sum(n_i^2). Instead of squaring at the end, two
// 2^m-word RAMs hold n_i and n_i^2 and are updated while bits arrive:
//     n_i   <- n_i + 1
//     n_i^2 <- n_i^2 + 2*n_i + 1
// 2*n_i is a wire shift and the +1 enters as the adder's carry-in, so one
// adder per table is all the update needs.
//
// Operation: when a block completes, both RAMs are read at address i; the
// next cycle the two incremented words are written back. A block completes at
// most once every m bits, so the read-modify-write never overlaps. After the
// last bit the square table is swept (2^m reads) and its words summed. The
// verdict
//     X = (m*2^m/N) * S - N/m,  pass iff 2.16 < X < 46.17
// is folded, at elaboration time, into integer bounds on S = sum(n_i^2):
// pass iff S_LO < S <= S_HI (1563175 and 1576928 for N = 20000, m = 4), so
// no divider or multiplier exists at run time either.
//
// Rather than clearing the RAMs, a 2^m-bit register records which words have
// been written since `clr`; an unwritten word is read as zero.
//
// Interface as the other tests (en, clr, bit_valid, bit_in, last); `done`
// rises 2^m + 2 cycles after the last bit (18 for m = 4) and holds with
// `pass` and `sum` until the next `clr`. Bits must not arrive after `last`.
//
// The two tables, the incremental squaring with the carry-in, and the sweep
// after acquisition follow the document. The FIPS bounds 2.16/46.17, their
// folding into S_LO/S_HI, the RAM timing and the written-word flags are this
// design's choices.
module poker_test #(
  parameter int unsigned N_BITS = fips_pkg::N_BITS_DEFAULT,
  parameter int unsigned M      = 4,
  localparam int unsigned NB    = N_BITS / M,          // number of blocks
  localparam int unsigned DEPTH = 1 << M,
  localparam int unsigned CW    = $clog2(NB + 1),      // n_i width
  localparam int unsigned SW    = $clog2(NB * NB + 1)  // n_i^2 and sum width
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  logic          clr,
  input  logic          bit_valid,
  input  logic          bit_in,
  input  logic          last,
  output logic          done,
  output logic          pass,
  output logic [SW-1:0] sum
);

  // S bounds: X > 2.16 <=> S > (N/m + 2.16) * N / (m*2^m), likewise for 46.17.
  localparam longint DEN  = longint'(M) * longint'(DEPTH) * 100;
  localparam longint S_LO = ((longint'(NB) * 100 + 216) * longint'(N_BITS)) / DEN;
  localparam longint S_HI = ((longint'(NB) * 100 + 4617) * longint'(N_BITS) + DEN - 1) / DEN - 1;

  typedef enum logic [1:0] {P_ACQ, P_FLUSH, P_SWEEP, P_TAIL} phase_e;
  phase_e phase;

  logic [M-2:0]         shreg;       // first m-1 bits of the current block
  logic [$clog2(M)-1:0] bit_idx;
  logic [M-1:0]         blk;
  logic                 blk_done;

  logic                 upd;         // read-modify-write, second cycle
  logic [M-1:0]         upd_addr;
  logic [DEPTH-1:0]     written;

  logic [M-1:0]         sweep_addr;
  logic                 acc;         // accumulate the word read last cycle
  logic [M-1:0]         acc_addr;

  logic [CW-1:0] n_rdata, n_cur, n_new;
  logic [SW-1:0] sq_rdata, sq_cur, sq_new;
  logic          re;
  logic [M-1:0]  raddr;

  assign blk      = {shreg, bit_in};
  assign blk_done = en && bit_valid && phase == P_ACQ && !done && bit_idx == ($clog2(M))'(M - 1);

  // Read port: block value during acquisition, sweep address afterwards.
  assign re    = blk_done || (en && phase == P_SWEEP);
  assign raddr = (phase == P_SWEEP) ? sweep_addr : blk;

  // Incremental square: n^2 + (n << 1) + carry-in.
  assign n_cur  = written[upd_addr] ? n_rdata  : '0;
  assign sq_cur = written[upd_addr] ? sq_rdata : '0;
  assign n_new  = n_cur + 1'b1;
  assign sq_new = sq_cur + SW'({n_cur, 1'b0}) + SW'(1'b1);

  poker_ram #(.DEPTH(DEPTH), .WIDTH(CW)) u_n_ram (
    .clk, .we(upd), .waddr(upd_addr), .wdata(n_new),
    .re(blk_done), .raddr(blk), .rdata(n_rdata)
  );

  poker_ram #(.DEPTH(DEPTH), .WIDTH(SW)) u_sq_ram (
    .clk, .we(upd), .waddr(upd_addr), .wdata(sq_new),
    .re(re), .raddr(raddr), .rdata(sq_rdata)
  );

  always_ff @(posedge clk) begin
    if (!rst_n || clr) begin
      phase      <= P_ACQ;
      shreg      <= '0;
      bit_idx    <= '0;
      upd        <= 1'b0;
      upd_addr   <= '0;
      written    <= '0;
      sweep_addr <= '0;
      acc        <= 1'b0;
      acc_addr   <= '0;
      sum        <= '0;
      done       <= 1'b0;
    end else if (en) begin
      upd <= blk_done;
      acc <= 1'b0;
      if (blk_done) upd_addr <= blk;
      if (upd) written[upd_addr] <= 1'b1;
      if (acc && written[acc_addr]) sum <= sum + sq_rdata;

      unique case (phase)
        P_ACQ: if (bit_valid && !done) begin
          shreg   <= blk[M-2:0];
          bit_idx <= (bit_idx == ($clog2(M))'(M - 1)) ? '0 : bit_idx + 1'b1;
          if (last) phase <= P_FLUSH;
        end
        P_FLUSH: phase <= P_SWEEP;          // last update is written this cycle
        P_SWEEP: begin
          acc      <= 1'b1;
          acc_addr <= sweep_addr;
          sweep_addr <= sweep_addr + 1'b1;
          if (sweep_addr == M'(DEPTH - 1)) phase <= P_TAIL;
        end
        P_TAIL: begin                        // last word is added this cycle
          done  <= 1'b1;
          phase <= P_ACQ;
        end
      endcase
    end
  end

  // A block must not complete while the previous one is still being written.
  assert property (@(posedge clk) disable iff (!rst_n) !(blk_done && upd && blk == upd_addr));

  assign pass = done && (longint'(sum) > S_LO) && (longint'(sum) <= S_HI);

endmodule
