// mofc: module of final carry-out of a carry-select block.
//
// c0 is the block's carry-out for a block carry-in of 0, x is 1 when every
// Cin=0 sum bit of the block is 1. With a carry-in of 1 the block carries out
// when it did already (c0) or when the +1 ripples through all bits (x), so
// c1 = c0 | x, and the actual carry-out is cin ? c1 : c0. It feeds the next
// block as that block's actual carry-in. The module, its inputs and its
// place in the block follow the source design; the OR form of c1 is derived
// here from the add-one principle. Combinational.
module mofc (
  input  logic c0,
  input  logic x,
  input  logic cin,
  output logic cout
);

  logic c1;

  always_comb begin
    c1   = c0 | x;
    cout = cin ? c1 : c0;
  end

endmodule
