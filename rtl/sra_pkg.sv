// Shared types and sizing functions of the self-repairing hybrid adder.
//
// fault_t is the fault-injection code carried to every self-checking full
// adder (SFA). It is a verification hook of this implementation, not part of
// the adder's function: with FLT_NONE on every SFA the adder is the plain
// self-checking, self-repairing design. The codes model a stuck-at value or
// an inversion on one of the three independent sub-circuits of an SFA (Sum,
// Carry out, Equivalence Tester).
//
// The sizing functions split a WIDTH-bit adder into a ripple-carry block of
// RCA_BITS low bits followed by carry-select (CSeA) blocks whose sizes grow by
// one bit per block, starting at FIRST_BLK (square-root topology). The last
// block takes whatever bits are left and may therefore be shorter. The
// growing block sizes follow the source design; the fault codes and the
// cutting of the last block are this implementation's.
package sra_pkg;

  typedef enum logic [2:0] {
    FLT_NONE     = 3'd0,
    FLT_SUM_SA0  = 3'd1,
    FLT_SUM_SA1  = 3'd2,
    FLT_COUT_SA0 = 3'd3,
    FLT_COUT_SA1 = 3'd4,
    FLT_EQT_SA0  = 3'd5,
    FLT_EQT_SA1  = 3'd6,
    FLT_SUM_FLIP = 3'd7
  } fault_t;

  // Number of CSeA blocks above the RCA block.
  function automatic int num_blocks(int width, int rca_bits, int first_blk);
    int rem, sz, n;
    rem = width - rca_bits;
    sz  = first_blk;
    n   = 0;
    while (rem > 0) begin
      rem -= sz;
      sz  += 1;
      n   += 1;
    end
    return n;
  endfunction

  // Least significant bit of CSeA block idx.
  function automatic int blk_lsb(int rca_bits, int first_blk, int idx);
    int lsb;
    lsb = rca_bits;
    for (int i = 0; i < idx; i++) lsb += first_blk + i;
    return lsb;
  endfunction

  // Width of CSeA block idx (the last block is cut to fit).
  function automatic int blk_size(int width, int rca_bits, int first_blk, int idx);
    int lsb, sz;
    lsb = blk_lsb(rca_bits, first_blk, idx);
    sz  = first_blk + idx;
    if (lsb + sz > width) sz = width - lsb;
    return sz;
  endfunction

  // Index of the first SFA of CSeA block idx in the adder-wide SFA numbering:
  // the RCA block owns SFAs 0..rca_bits (its spare included), and every block
  // owns one SFA per bit plus one spare.
  function automatic int blk_sfa_base(int rca_bits, int first_blk, int idx);
    return blk_lsb(rca_bits, first_blk, idx) + 1 + idx;
  endfunction

endpackage
