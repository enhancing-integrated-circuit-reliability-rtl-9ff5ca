// rca_block: self-repairing ripple-carry block for the low bits of the adder.
//
// W bits are added by a chain of W+1 RBL cells; cell W is the hot-standby
// spare. Each cell's SFA checks itself. When cell k flags an error, its
// carry bypass hands the incoming carry straight to cell k+1, the input
// shifter (ips) feeds bits k..W-1 to cells k+1..W, and the output shifter
// (ops) takes the sums back from there, so the result stays correct with one
// faulty cell in the block. Repair is concurrent: it acts within the same
// combinational evaluation in which the fault shows, and nothing is stored.
// ef[p] is the error flag of cell p (fault localization). The block's
// carry-out is taken from the spare when the shift reaches the top bit.
// flt is the per-cell fault-injection input (FLT_NONE in normal use).
// The cells, shifters and one spare per block follow the source design;
// taking the carry-out from the spare, and the 2-bit default, are this
// implementation's reading of it.
module rca_block
  import sra_pkg::*;
#(
  parameter int unsigned W = 2
) (
  input  logic         [W-1:0] a,
  input  logic         [W-1:0] b,
  input  logic                 cin,
  input  fault_t       [W:0]   flt,
  output logic         [W-1:0] s,
  output logic                 cout,
  output logic         [W:0]   ef
);

  logic [W:0] a_p, b_p, s_p, shift, c;

  ips #(.W(W)) u_ips (.a(a), .b(b), .shift(shift[W-1:0]), .a_p(a_p), .b_p(b_p));

  for (genvar p = 0; p <= W; p++) begin : g_cell
    rbl u_rbl (
      .a      (a_p[p]),
      .b      (b_p[p]),
      .cin    (p == 0 ? cin : c[p == 0 ? 0 : p-1]),
      .ef_prev(p == 0 ? 1'b0 : shift[p == 0 ? 0 : p-1]),
      .flt    (flt[p]),
      .s      (s_p[p]),
      .cout   (c[p]),
      .ef     (ef[p]),
      .shift  (shift[p])
    );
  end

  ops #(.W(W)) u_ops (.s_p(s_p), .shift(shift[W-1:0]), .s(s));

  assign cout = shift[W-1] ? c[W] : c[W-1];

endmodule
