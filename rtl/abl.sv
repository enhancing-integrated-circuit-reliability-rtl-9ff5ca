// abl: adder cell of a self-repairing carry-select block (above the INL).
//
// The SFA adds a, b and the Cin=0 ripple carry c_prev, giving s0. The sum for
// a block carry-in of 1 is s1 = s0 ^ x_prev, where x_prev is 1 when every
// lower Cin=0 sum bit of the block is 1 (the +1 ripples up to here). The cell
// extends that AND chain: x = x_prev & (s0 | ef). With a fault detected the
// error stands in for the sum bit, so x = x_prev and the faulty cell is
// invisible to the cells above; its carry output is bypassed the same way,
// c = ef ? c_prev : SFA carry. shift = ef | ef_prev marks this and every
// higher cell as shifted. s = cin_blk ? s1 : s0 is the final sum for the
// block's actual carry-in. The AND/XOR structure, the carry bypass and the
// X hold follow the source design; the operand and sum shifting it draws
// inside the cell is done by ips / ops here. Combinational.
module abl
  import sra_pkg::*;
(
  input  logic   a,
  input  logic   b,
  input  logic   c_prev,
  input  logic   x_prev,
  input  logic   ef_prev,
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

  sfa u_sfa (.a(a), .b(b), .cin(c_prev), .flt(flt), .sum(s0), .cout(co), .ef(ef));

  always_comb begin
    s1    = s0 ^ x_prev;
    s     = cin_blk ? s1 : s0;
    c     = ef ? c_prev : co;
    x     = x_prev & (s0 | ef);
    shift = ef | ef_prev;
  end

endmodule
