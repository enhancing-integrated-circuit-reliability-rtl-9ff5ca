// ips: input shifter of one self-repairing block.
//
// A block of W bits has W+1 adder cells; the top one is the hot-standby
// spare. shift[p] is 1 when cell p or a cell below it has flagged an error.
// Cell p receives operand bit p while nothing below it is faulty, and operand
// bit p-1 once shift[p-1] is 1, so from the faulty cell on every bit moves
// one cell up and the faulty cell is left out. Cell 0 always gets bit 0. The
// spare cell has no bit of its own and gets zeros while it is not needed
// (a choice of this implementation). The shifting itself follows the source
// design. Combinational.
module ips #(
  parameter int unsigned W = 2
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] shift,
  output logic [W:0]   a_p,
  output logic [W:0]   b_p
);

  logic [W:0] a_ext, b_ext;

  always_comb begin
    a_ext  = {1'b0, a};
    b_ext  = {1'b0, b};
    a_p[0] = a[0];
    b_p[0] = b[0];
    for (int p = 1; p <= W; p++) begin
      a_p[p] = shift[p-1] ? a_ext[p-1] : a_ext[p];
      b_p[p] = shift[p-1] ? b_ext[p-1] : b_ext[p];
    end
  end

endmodule
