// Exhaustive test of abl: a, b, c_prev, x_prev, ef_prev, cin_blk under every
// fault code. Checks the Cin=0 sum, the Cin=1 sum (flipped when x_prev), the
// selected sum, the carry bypass, the X chain (held at x_prev when the cell is
// faulty) and the shift signal.
module tb_abl;
  import sra_pkg::*;
  import tb_fa_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic   a, b, c_prev, x_prev, ef_prev, cin_blk;
  logic   s0, s1, s, c, x, ef, shift;
  fault_t flt;

  abl dut (.a(a), .b(b), .c_prev(c_prev), .x_prev(x_prev), .ef_prev(ef_prev),
           .cin_blk(cin_blk), .flt(flt), .s0(s0), .s1(s1), .s(s), .c(c), .x(x),
           .ef(ef), .shift(shift));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic es, ec, ee, exp_x;
    int held = 0;
    for (int f = 0; f < 8; f++) begin
      for (int v = 0; v < 64; v++) begin
        flt = fault_t'(f);
        {a, b, c_prev, x_prev, ef_prev, cin_blk} = 6'(v);
        @(posedge clk);
        fa_ref(a, b, c_prev, flt, es, ec, ee);
        exp_x = ee ? x_prev : (x_prev & es);
        checks++;
        if (s0 !== es || s1 !== (x_prev ? ~es : es) || s !== (cin_blk ? s1 : s0) ||
            c !== (ee ? c_prev : ec) || x !== exp_x || ef !== ee ||
            shift !== (ee | ef_prev)) begin
          failures++;
          $display("FAIL flt=%0d v=%b: s0=%b s1=%b s=%b c=%b x=%b ef=%b shift=%b",
                   f, 6'(v), s0, s1, s, c, x, ef, shift);
        end
        if (ee && x_prev && !es) held++;
      end
    end
    checks++;
    if (held == 0) begin failures++; $display("X hold never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
