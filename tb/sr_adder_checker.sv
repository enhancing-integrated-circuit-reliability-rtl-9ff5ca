// Test helper: drives one sr_hybrid_adder of the given size with random
// operands under random fault patterns (at most one faulty SFA per block,
// redrawn every 8 vectors, one pattern in four fault-free) and checks that
// the sum is exact, that only faulty cells raise their flags and that err is
// their OR. Reports its check and failure counts and raises done when
// finished; it does not end the simulation itself.
module sr_adder_checker
  import sra_pkg::*;
#(
  parameter int WIDTH     = 16,
  parameter int RCA_BITS  = 2,
  parameter int FIRST_BLK = 2,
  parameter int NVEC      = 20000
) (
  input  logic clk,
  output int   checks,
  output int   failures,
  output int   repairs,
  output logic done
);
  localparam int NBLK = num_blocks(WIDTH, RCA_BITS, FIRST_BLK);
  localparam int NSFA = WIDTH + 1 + NBLK;

  logic [WIDTH-1:0]  a, b, sum;
  logic              cin, cout, err;
  fault_t [NSFA-1:0] flt;
  logic [NSFA-1:0]   ef, allowed;

  sr_hybrid_adder #(.WIDTH(WIDTH), .RCA_BITS(RCA_BITS), .FIRST_BLK(FIRST_BLK)) dut (
    .a(a), .b(b), .cin(cin), .flt(flt), .sum(sum), .cout(cout), .ef(ef), .err(err));

  initial begin
    logic [WIDTH:0] expv;
    int base, size, pos;
    checks   = 0;
    failures = 0;
    repairs  = 0;
    done     = 1'b0;
    flt      = '{default: FLT_NONE};
    allowed  = '0;
    for (int v = 0; v < NVEC; v++) begin
      if (v % 8 == 0) begin
        flt     = '{default: FLT_NONE};
        allowed = '0;
        if ($urandom_range(3) != 0) begin
          for (int j = 0; j <= NBLK; j++) begin
            base = (j == 0) ? 0 : blk_sfa_base(RCA_BITS, FIRST_BLK, j - 1);
            size = (j == 0) ? RCA_BITS : blk_size(WIDTH, RCA_BITS, FIRST_BLK, j - 1);
            if ($urandom_range(2) != 0) begin
              pos = base + int'($urandom_range(size));
              flt[pos]     = fault_t'($urandom_range(7, 1));
              allowed[pos] = 1'b1;
            end
          end
        end
      end
      for (int i = 0; i < WIDTH; i++) begin
        a[i] = 1'($urandom);
        b[i] = 1'($urandom);
      end
      if (v % 5 == 0) b = ~a;
      cin = 1'($urandom);
      @(posedge clk);
      expv = {1'b0, a} + {1'b0, b} + (WIDTH + 1)'(cin);
      checks += 2;
      if ({cout, sum} !== expv) begin
        failures++;
        $display("FAIL W=%0d a=%h b=%h cin=%b: got %h expected %h", WIDTH, a, b, cin,
                 {cout, sum}, expv);
      end
      if ((ef & ~allowed) !== '0 || err !== (ef != '0)) begin
        failures++;
        $display("FAIL W=%0d false alarm ef=%b", WIDTH, ef);
      end
      if (ef != '0) repairs++;
    end
    done = 1'b1;
  end
endmodule
