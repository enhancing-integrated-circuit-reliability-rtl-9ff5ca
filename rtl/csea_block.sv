// csea_block: self-repairing carry-select block built on a single ripple chain.
//
// K bits are added once, for a block carry-in of 0, by an INL cell and K
// ABL cells (the top ABL is the hot-standby spare). The sums for a carry-in
// of 1 are derived from those: the lowest bit is complemented (INL) and each
// higher bit is flipped when all Cin=0 sums below it are 1 (AND chain X in
// the ABLs). Each cell picks its final sum with the block's actual carry-in
// cin, and the MOFC forms the carry-out C0 | X, selected by cin.
//
// Repair: a cell that flags an error bypasses the Cin=0 carry and holds X,
// and from it upwards the input shifter (ips) and output shifter (ops) move
// the bits one cell up, so one faulty cell per block is tolerated. The C0
// and X given to the MOFC are taken from the spare when the shift reaches
// the top bit. X is never passed to the next block. ef[p] is the error flag
// of cell p (fault localization). flt is the per-cell fault-injection input
// (FLT_NONE in normal use). Combinational. The cell structure and MOFC
// follow the source design; one spare per block, zero operands for the idle
// spare and taking C0 / X from the spare are choices of this implementation.
module csea_block
  import sra_pkg::*;
#(
  parameter int unsigned K = 2
) (
  input  logic         [K-1:0] a,
  input  logic         [K-1:0] b,
  input  logic                 cin,
  input  fault_t       [K:0]   flt,
  output logic         [K-1:0] s,
  output logic                 cout,
  output logic         [K:0]   ef
);

  logic [K:0] a_p, b_p, s_p, shift, c, x;
  logic       c0_blk, x_blk;

  ips #(.W(K)) u_ips (.a(a), .b(b), .shift(shift[K-1:0]), .a_p(a_p), .b_p(b_p));

  inl u_inl (
    .a      (a_p[0]),
    .b      (b_p[0]),
    .cin_blk(cin),
    .flt    (flt[0]),
    .s0     (),
    .s1     (),
    .s      (s_p[0]),
    .c      (c[0]),
    .x      (x[0]),
    .ef     (ef[0]),
    .shift  (shift[0])
  );

  for (genvar p = 1; p <= K; p++) begin : g_abl
    abl u_abl (
      .a      (a_p[p]),
      .b      (b_p[p]),
      .c_prev (c[p-1]),
      .x_prev (x[p-1]),
      .ef_prev(shift[p-1]),
      .cin_blk(cin),
      .flt    (flt[p]),
      .s0     (),
      .s1     (),
      .s      (s_p[p]),
      .c      (c[p]),
      .x      (x[p]),
      .ef     (ef[p]),
      .shift  (shift[p])
    );
  end

  ops #(.W(K)) u_ops (.s_p(s_p), .shift(shift[K-1:0]), .s(s));

  always_comb begin
    c0_blk = shift[K-1] ? c[K] : c[K-1];
    x_blk  = shift[K-1] ? x[K] : x[K-1];
  end

  mofc u_mofc (.c0(c0_blk), .x(x_blk), .cin(cin), .cout(cout));

endmodule
