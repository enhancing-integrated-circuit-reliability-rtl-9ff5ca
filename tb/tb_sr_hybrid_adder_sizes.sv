// Runs the self-repairing hybrid adder at two sizes other than the default:
// 8 bits (2-bit RCA block, CSeA blocks of 2, 3 and a last block cut to 1 bit)
// and 32 bits (2-bit RCA block, CSeA blocks of 2..7 and a last block cut to
// 3 bits), each with random operands under random single-fault-per-block
// patterns. Sums must be exact and only faulty cells may be flagged; each
// size must also have seen at least one detected fault.
module tb_sr_hybrid_adder_sizes;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int   c8, f8, r8, c32, f32, r32;
  logic d8, d32;

  sr_adder_checker #(.WIDTH(8),  .NVEC(40000)) u_w8  (.clk(clk), .checks(c8),  .failures(f8),
                                                     .repairs(r8),  .done(d8));
  sr_adder_checker #(.WIDTH(32), .NVEC(40000)) u_w32 (.clk(clk), .checks(c32), .failures(f32),
                                                     .repairs(r32), .done(d32));

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (d8 && d32);
    checks   = c8 + c32 + 2;
    failures = f8 + f32;
    if (r8 == 0)  failures++;
    if (r32 == 0) failures++;
    $display("8-bit: checks=%0d detections=%0d; 32-bit: checks=%0d detections=%0d",
             c8, r8, c32, r32);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
