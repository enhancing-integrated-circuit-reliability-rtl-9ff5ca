// Exhaustive test of rbl: inputs a, b, cin, ef_prev under every fault code.
// Checks the sum, the carry bypass (cout = cin when the fault is seen), the
// error flag and the shift signal (local error OR the error from below).
module tb_rbl;
  import sra_pkg::*;
  import tb_fa_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic   a, b, cin, ef_prev, s, cout, ef, shift;
  fault_t flt;

  rbl dut (.a(a), .b(b), .cin(cin), .ef_prev(ef_prev), .flt(flt),
           .s(s), .cout(cout), .ef(ef), .shift(shift));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic es, ec, ee;
    int bypassed = 0;
    for (int f = 0; f < 8; f++) begin
      for (int v = 0; v < 16; v++) begin
        flt = fault_t'(f);
        {a, b, cin, ef_prev} = 4'(v);
        @(posedge clk);
        fa_ref(a, b, cin, flt, es, ec, ee);
        checks++;
        if (s !== es || ef !== ee || shift !== (ee | ef_prev) ||
            cout !== (ee ? cin : ec)) begin
          failures++;
          $display("FAIL flt=%0d a=%b b=%b cin=%b efp=%b: s=%b cout=%b ef=%b shift=%b",
                   f, a, b, cin, ef_prev, s, cout, ef, shift);
        end
        if (ee && cout == cin && ec != cin) bypassed++;
      end
    end
    checks++;
    if (bypassed == 0) begin failures++; $display("carry bypass never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
