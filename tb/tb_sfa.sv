// Exhaustive test of sfa: all 8 input patterns under every fault code.
// Checks sum and carry against the arithmetic reference with the same fault
// applied, and that the error flag rises exactly when the fault is visible.
module tb_sfa;
  import sra_pkg::*;
  import tb_fa_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic   a, b, cin, sum, cout, ef;
  fault_t flt;

  sfa dut (.a(a), .b(b), .cin(cin), .flt(flt), .sum(sum), .cout(cout), .ef(ef));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic es, ec, ee;
    int detected = 0;
    for (int f = 0; f < 8; f++) begin
      for (int v = 0; v < 8; v++) begin
        flt = fault_t'(f);
        {a, b, cin} = 3'(v);
        @(posedge clk);
        fa_ref(a, b, cin, flt, es, ec, ee);
        checks++;
        if (sum !== es || cout !== ec || ef !== ee) begin
          failures++;
          $display("FAIL flt=%0d abc=%b%b%b: sum=%b cout=%b ef=%b, expected %b %b %b",
                   f, a, b, cin, sum, cout, ef, es, ec, ee);
        end
        if (ef) detected++;
      end
    end
    // every fault code except FLT_NONE must be seen on some pattern
    checks++;
    if (detected == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
