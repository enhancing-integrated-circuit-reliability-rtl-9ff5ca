// Test of ops with W = 4: every cell-output value and every shift pattern
// (none, or from cell k upwards). Sum bits below k come from their own cell,
// bits from k on from the cell above.
module tb_ops;
  localparam int W = 4;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [W:0]   s_p;
  logic [W-1:0] shift, s;

  ops #(.W(W)) dut (.s_p(s_p), .shift(shift), .s(s));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] es;
    for (int k = 0; k <= W; k++) begin
      shift = (k == W) ? '0 : W'(~((1 << k) - 1));
      for (int v = 0; v < (1 << (W + 1)); v++) begin
        s_p = (W + 1)'(v);
        @(posedge clk);
        for (int i = 0; i < W; i++) es[i] = (i < k) ? s_p[i] : s_p[i+1];
        checks++;
        if (s !== es) begin
          failures++;
          $display("FAIL k=%0d s_p=%b: s=%b", k, s_p, s);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
