// inl: initial (least significant) cell of a self-repairing carry-select block.
//
// The block's single ripple chain computes every sum for a block carry-in of
// 0. For a carry-in of 1 the lowest sum bit is simply the complement, so
// s1 = ~s0. The cell also starts the X chain that tells the cells above
// whether all lower Cin=0 sums are 1: x = s0 | ef. On a detected fault the
// error replaces the sum bit in that AND chain, so a faulty cell does not
// disturb X (it behaves as if X of "nothing below" = 1 passed through), and
// its Cin=0 carry output is the constant 0 it was given (carry bypass).
// s = cin_blk ? s1 : s0 is the cell's final sum for the block's actual
// carry-in. The structure follows the source design; its operand and sum
// shifting is done by ips / ops here. Combinational.
module inl
  import sra_pkg::*;
(
  input  logic   a,
  input  logic   b,
  input  logic   cin_blk,
  input  fault_t flt,
  output logic   s0,
  output logic   s1,
  output logic   s,
  output logic   c,
  output logic   x,
  output logic   ef,
  output logic   shift
);

  logic co;

  sfa u_sfa (.a(a), .b(b), .cin(1'b0), .flt(flt), .sum(s0), .cout(co), .ef(ef));

  always_comb begin
    s1    = ~s0;
    s     = cin_blk ? s1 : s0;
    c     = ef ? 1'b0 : co;
    x     = s0 | ef;
    shift = ef;
  end

endmodule
