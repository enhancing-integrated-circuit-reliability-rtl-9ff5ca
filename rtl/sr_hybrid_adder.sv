// sr_hybrid_adder: self-checking, self-repairing hybrid adder.
//
// sum/cout = a + b + cin, computed by a ripple-carry block on the RCA_BITS
// low bits (a carry-select block is slower than a ripple chain for the first
// few bits) followed by single-ripple-chain carry-select blocks whose sizes
// grow by one bit each, FIRST_BLK, FIRST_BLK+1, ... (square-root topology;
// the last block takes the bits that are left). The RCA block's carry-out is
// the first CSeA block's actual carry-in, and each block's MOFC carry-out is
// the next one's.
//
// Every full adder is a self-checking SFA, and every block holds one spare
// adder cell, so the adder keeps producing correct sums with up to one
// faulty adder per block, several blocks at once included. ef is the
// adder-wide vector of SFA error flags and localizes a fault to its cell:
// bits 0..RCA_BITS are the RCA block (the last being its spare), then each
// CSeA block owns size+1 consecutive bits, lowest first, spare last.
// err is the OR of all flags. flt is a fault-injection input per SFA for
// verification (FLT_NONE in normal use). Entirely combinational.
//
// The 16-bit width and the 2 / 2,3,4,5 split are this implementation's
// defaults; the block structure and repair scheme follow the source design.
module sr_hybrid_adder
  import sra_pkg::*;
#(
  parameter int unsigned WIDTH     = 16,
  parameter int unsigned RCA_BITS  = 2,
  parameter int unsigned FIRST_BLK = 2,
  localparam int unsigned NBLK     = num_blocks(WIDTH, RCA_BITS, FIRST_BLK),
  localparam int unsigned NSFA     = WIDTH + 1 + NBLK
) (
  input  logic   [WIDTH-1:0] a,
  input  logic   [WIDTH-1:0] b,
  input  logic               cin,
  input  fault_t [NSFA-1:0]  flt,
  output logic   [WIDTH-1:0] sum,
  output logic               cout,
  output logic   [NSFA-1:0]  ef,
  output logic               err
);

  logic [NBLK:0] cblk;

  rca_block #(.W(RCA_BITS)) u_rca (
    .a   (a[RCA_BITS-1:0]),
    .b   (b[RCA_BITS-1:0]),
    .cin (cin),
    .flt (flt[RCA_BITS:0]),
    .s   (sum[RCA_BITS-1:0]),
    .cout(cblk[0]),
    .ef  (ef[RCA_BITS:0])
  );

  for (genvar j = 0; j < NBLK; j++) begin : g_blk
    localparam int unsigned K = blk_size(WIDTH, RCA_BITS, FIRST_BLK, j);
    localparam int unsigned L = blk_lsb(RCA_BITS, FIRST_BLK, j);
    localparam int unsigned F = blk_sfa_base(RCA_BITS, FIRST_BLK, j);
    csea_block #(.K(K)) u_csea (
      .a   (a[L+K-1:L]),
      .b   (b[L+K-1:L]),
      .cin (cblk[j]),
      .flt (flt[F+K:F]),
      .s   (sum[L+K-1:L]),
      .cout(cblk[j+1]),
      .ef  (ef[F+K:F])
    );
  end

  assign cout = cblk[NBLK];
  assign err  = |ef;

endmodule
