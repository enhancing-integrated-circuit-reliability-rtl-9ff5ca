// Exhaustive test of mofc. The block's carry-out for carry-in 1 is 1 when
// the block carried out already with carry-in 0, or when all its Cin=0 sum
// bits are 1; checked against that rule for all 8 input patterns.
module tb_mofc;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic c0, x, cin, cout;

  mofc dut (.c0(c0), .x(x), .cin(cin), .cout(cout));

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp_c;
    for (int v = 0; v < 8; v++) begin
      {c0, x, cin} = 3'(v);
      @(posedge clk);
      if (!cin)      exp_c = c0;
      else if (c0)   exp_c = 1'b1;
      else           exp_c = x;
      checks++;
      if (cout !== exp_c) begin
        failures++;
        $display("FAIL c0=%b x=%b cin=%b cout=%b", c0, x, cin, cout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
