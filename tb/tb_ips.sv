// Test of ips with W = 4: every operand value and every shift pattern the
// adder cells can produce (no shift, or shift from cell k upwards). Cells up
// to k must see their own bit, cells above k the bit below, the spare 0 when
// unused.
module tb_ips;
  localparam int W = 4;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [W-1:0] a, b, shift;
  logic [W:0]   a_p, b_p;

  ips #(.W(W)) dut (.a(a), .b(b), .shift(shift), .a_p(a_p), .b_p(b_p));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W:0] ea, eb;
    for (int k = 0; k <= W; k++) begin
      shift = (k == W) ? '0 : W'(~((1 << k) - 1));
      for (int v = 0; v < (1 << (2 * W)); v++) begin
        {a, b} = (2 * W)'(v);
        @(posedge clk);
        for (int p = 0; p <= W; p++) begin
          if (p <= k) begin
            ea[p] = (p < W) ? a[p] : 1'b0;
            eb[p] = (p < W) ? b[p] : 1'b0;
          end else begin
            ea[p] = a[p-1];
            eb[p] = b[p-1];
          end
        end
        checks++;
        if (a_p !== ea || b_p !== eb) begin
          failures++;
          $display("FAIL k=%0d a=%b b=%b: a_p=%b b_p=%b", k, a, b, a_p, b_p);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
