// ops: output shifter of one self-repairing block.
//
// The mirror of ips: sum bit i is taken from cell i while no cell up to i
// has flagged an error, and from cell i+1 once shift[i] is 1, undoing the
// input shift so the block's outputs keep their bit positions. W+1 cell
// outputs in, W sum bits out. Follows the source design's output shifting.
// Combinational.
module ops #(
  parameter int unsigned W = 2
) (
  input  logic [W:0]   s_p,
  input  logic [W-1:0] shift,
  output logic [W-1:0] s
);

  always_comb begin
    for (int i = 0; i < W; i++) s[i] = shift[i] ? s_p[i+1] : s_p[i];
  end

endmodule
