// Exhaustive test of inl: a, b, block carry-in under every fault code.
// The cell adds a + b with carry 0; checks the Cin=0 sum, its complement for
// Cin=1, the selected sum, the bypassed Cin=0 carry, and the X output (the
// sum bit, or 1 when the cell is faulty).
module tb_inl;
  import sra_pkg::*;
  import tb_fa_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic   a, b, cin_blk, s0, s1, s, c, x, ef, shift;
  fault_t flt;

  inl dut (.a(a), .b(b), .cin_blk(cin_blk), .flt(flt), .s0(s0), .s1(s1), .s(s),
           .c(c), .x(x), .ef(ef), .shift(shift));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic es, ec, ee;
    logic [1:0] plus1;
    for (int f = 0; f < 8; f++) begin
      for (int v = 0; v < 8; v++) begin
        flt = fault_t'(f);
        {a, b, cin_blk} = 3'(v);
        @(posedge clk);
        fa_ref(a, b, 1'b0, flt, es, ec, ee);
        plus1 = 2'(int'(a) + int'(b) + 1);
        checks++;
        if (s0 !== es || ef !== ee || shift !== ee || c !== (ee ? 1'b0 : ec) ||
            x !== (es | ee) || s !== (cin_blk ? s1 : s0)) begin
          failures++;
          $display("FAIL flt=%0d a=%b b=%b cin=%b", f, a, b, cin_blk);
        end
        // fault-free: s1 is the sum bit of a + b + 1
        if (f == 0) begin
          checks++;
          if (s1 !== plus1[0]) begin failures++; $display("FAIL s1 a=%b b=%b", a, b); end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
