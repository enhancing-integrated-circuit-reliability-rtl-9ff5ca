// rbl: cell of the self-repairing ripple-carry block.
//
// One SFA plus the two pieces that make hot-standby repair possible:
//   * carry bypass: cout = ef ? cin : SFA carry, so a faulty adder passes the
//     carry it received straight on and drops out of the carry chain;
//   * shift = ef | ef_prev, the OR of this cell's error with the shift signal
//     of the cell below. From the first faulty cell upwards, shift is 1 and
//     moves operands and sums one position (see ips / ops).
// The lowest cell of a block has no error below it; its ef_prev is tied to 0,
// which makes the OR a wire there, as in the source design.
// a and b arrive already shifted by the input shifter. Combinational.
module rbl
  import sra_pkg::*;
(
  input  logic   a,
  input  logic   b,
  input  logic   cin,
  input  logic   ef_prev,
  input  fault_t flt,
  output logic   s,
  output logic   cout,
  output logic   ef,
  output logic   shift
);

  logic co;

  sfa u_sfa (.a(a), .b(b), .cin(cin), .flt(flt), .sum(s), .cout(co), .ef(ef));

  always_comb begin
    cout  = ef ? cin : co;
    shift = ef | ef_prev;
  end

endmodule
