// Exhaustive test of a 4-bit csea_block: all operands and both carry-in
// values, with no fault and with every fault code in every cell (INL, ABLs,
// spare). The block must always return a + b + cin; the error vector may flag
// only the faulty cell, and must flag it exactly when the fault shows for the
// inputs that cell sees on the Cin=0 chain. Counts repairs, repairs with
// carry-in 1 where the +1 had to pass the faulty cell (X held), bypasses of
// a carry 1 and spare faults, and fails if any never happened.
module tb_csea_block;
  import sra_pkg::*;
  import tb_fa_pkg::*;

  localparam int K = 4;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [K-1:0] a, b, s;
  logic         cin, cout;
  fault_t [K:0] flt;
  logic [K:0]   ef;

  csea_block #(.K(K)) dut (.a(a), .b(b), .cin(cin), .flt(flt), .s(s), .cout(cout), .ef(ef));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int repairs = 0, xhold = 0, bypass1 = 0, spare = 0;
    logic es, ec, ee, ap, bp, cp;
    int tot, low, m;
    for (int p = -1; p <= K; p++) begin
      for (int f = 1; f < 8; f++) begin
        for (int v = 0; v < (1 << (2 * K + 1)); v++) begin
          {a, b, cin} = (2 * K + 1)'(v);
          flt = '{default: FLT_NONE};
          if (p >= 0) flt[p] = fault_t'(f);
          @(posedge clk);
          tot = int'(a) + int'(b) + int'(cin);
          checks++;
          if ({cout, s} !== (K + 1)'(tot)) begin
            failures++;
            $display("FAIL p=%0d f=%0d a=%0d b=%0d cin=%b: got %0d", p, f, a, b, cin, {cout, s});
          end
          checks++;
          if (p < 0 ? (ef !== '0) : ((ef & ~((K + 1)'(1) << p)) !== '0)) begin
            failures++;
            $display("FAIL false alarm p=%0d ef=%b", p, ef);
          end
          if (p >= 0) begin
            m   = (1 << p) - 1;
            low = (int'(a) & m) + (int'(b) & m);   // Cin=0 chain below cell p
            ap  = (p < K) ? a[p] : 1'b0;
            bp  = (p < K) ? b[p] : 1'b0;
            cp  = 1'(low >> p);
            fa_ref(ap, bp, cp, fault_t'(f), es, ec, ee);
            checks++;
            if (ef[p] !== ee) begin
              failures++;
              $display("FAIL localization p=%0d f=%0d ef=%b", p, f, ef);
            end
            if (ee && p < K) repairs++;
            if (ee && p < K && cp) bypass1++;
            if (ee && p < K && cin && ((low & m) == m)) xhold++;
            if (ee && p == K) spare++;
          end
        end
        if (p < 0) break;
      end
    end
    $display("repairs=%0d xhold=%0d bypass_with_carry=%0d spare_faults=%0d",
             repairs, xhold, bypass1, spare);
    checks += 4;
    if (repairs == 0) failures++;
    if (xhold == 0)   failures++;
    if (bypass1 == 0) failures++;
    if (spare == 0)   failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
