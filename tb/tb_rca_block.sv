// Exhaustive test of rca_block at its default width: all operands and carry
// inputs, with no fault and with every fault code in every cell (the spare
// included). The block must always return a + b + cin; the error vector may
// flag only the faulty cell, and must flag it exactly when the fault shows
// for the inputs that cell sees. Counts repairs, carry bypasses that carry a
// 1 and spare faults, and fails if any of them never happened.
module tb_rca_block;
  import sra_pkg::*;
  import tb_fa_pkg::*;

  localparam int W = 2;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [W-1:0] a, b, s;
  logic         cin, cout;
  fault_t [W:0] flt;
  logic [W:0]   ef;

  rca_block dut (.a(a), .b(b), .cin(cin), .flt(flt), .s(s), .cout(cout), .ef(ef));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int repairs = 0, bypass1 = 0, spare = 0;
    logic es, ec, ee, ap, bp, cp;
    int tot;
    for (int p = -1; p <= W; p++) begin
      for (int f = 1; f < 8; f++) begin
        for (int v = 0; v < (1 << (2 * W + 1)); v++) begin
          {a, b, cin} = (2 * W + 1)'(v);
          flt = '{default: FLT_NONE};
          if (p >= 0) flt[p] = fault_t'(f);
          @(posedge clk);
          tot = int'(a) + int'(b) + int'(cin);
          checks++;
          if ({cout, s} !== (W + 1)'(tot)) begin
            failures++;
            $display("FAIL p=%0d f=%0d a=%0d b=%0d cin=%b: got %0d", p, f, a, b, cin, {cout, s});
          end
          checks++;
          if (p < 0 ? (ef !== '0) : ((ef & ~((W + 1)'(1) << p)) !== '0)) begin
            failures++;
            $display("FAIL false alarm p=%0d ef=%b", p, ef);
          end
          if (p >= 0) begin
            // the faulty cell is below any shift, so it sees its own bit
            ap = (p < W) ? a[p] : 1'b0;
            bp = (p < W) ? b[p] : 1'b0;
            cp = 1'((((p == 0) ? 0 : (int'(a) & ((1 << p) - 1)) + (int'(b) & ((1 << p) - 1)))
                     + int'(cin)) >> p);
            fa_ref(ap, bp, cp, fault_t'(f), es, ec, ee);
            checks++;
            if (ef[p] !== ee) begin
              failures++;
              $display("FAIL localization p=%0d f=%0d ef=%b", p, f, ef);
            end
            if (ee && p < W) repairs++;
            if (ee && p < W && cp) bypass1++;
            if (ee && p == W) spare++;
          end
        end
        if (p < 0) break;
      end
    end
    $display("repairs=%0d bypass_with_carry=%0d spare_faults=%0d", repairs, bypass1, spare);
    checks += 3;
    if (repairs == 0) failures++;
    if (bypass1 == 0) failures++;
    if (spare == 0)   failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
