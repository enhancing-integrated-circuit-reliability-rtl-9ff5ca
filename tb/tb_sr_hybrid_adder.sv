// End-to-end test of sr_hybrid_adder with its default parameters (16 bits:
// a 2-bit ripple-carry block, then carry-select blocks of 2, 3, 4 and 5 bits).
//
// Phase 1 adds random and carry-propagating operands with no fault: the sum
// must be exact and no error flag may rise. Phase 2 draws, every 16 vectors,
// a new fault pattern with at most one faulty SFA per block (any cell, spare
// included, any fault code) and keeps checking that a + b + cin comes out
// exact, that only faulty cells are flagged, and that each faulty cell is
// flagged exactly when its fault shows for the inputs it sees.
//
// It counts each mechanism of the design and fails if one never happened:
// a repair in the RCA block, a repair in every CSeA block, a fault in a
// spare, repairs in two or more blocks at once, a bypassed carry of 1, the
// Cin=1 increment passing a repaired cell (X held), a block selecting its
// Cin=1 results, and a carry rippling through the whole adder.
module tb_sr_hybrid_adder;
  import sra_pkg::*;
  import tb_fa_pkg::*;

  localparam int WIDTH     = 16;
  localparam int RCA_BITS  = 2;
  localparam int FIRST_BLK = 2;
  localparam int NBLK      = num_blocks(WIDTH, RCA_BITS, FIRST_BLK);
  localparam int NSFA      = WIDTH + 1 + NBLK;
  localparam int NVEC      = 200000;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [WIDTH-1:0]  a, b, sum;
  logic              cin, cout, err;
  fault_t [NSFA-1:0] flt;
  logic [NSFA-1:0]   ef;

  sr_hybrid_adder dut (.a(a), .b(b), .cin(cin), .flt(flt),
                       .sum(sum), .cout(cout), .ef(ef), .err(err));

  initial begin
    repeat (NVEC + 20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // block geometry: block 0 is the RCA block, blocks 1..NBLK the CSeA blocks
  int g_lsb [NBLK+1];
  int g_size[NBLK+1];
  int g_base[NBLK+1];
  int fpos  [NBLK+1];   // faulty cell inside the block, -1 for none
  fault_t fcode[NBLK+1];

  int n_rca_rep = 0, n_spare = 0, n_multi = 0, n_bypass1 = 0, n_xhold = 0;
  int n_sel1 = 0, n_ripple = 0;
  int n_blk_rep[NBLK+1];

  task automatic apply_and_check(input bit faulty);
    longint tot, expv, m, low, cb;
    logic es, ec, ee, ap, bp, cp;
    logic [NSFA-1:0] allowed;
    int nrep, q, lsb, k;
    @(posedge clk);
    tot  = longint'(a) + longint'(b) + longint'(cin);
    expv = tot & ((longint'(1) << (WIDTH + 1)) - 1);
    checks++;
    if ({cout, sum} !== (WIDTH + 1)'(expv)) begin
      failures++;
      $display("FAIL a=%h b=%h cin=%b: got %h expected %h", a, b, cin, {cout, sum}, expv);
    end
    if (a == ~b && cin) n_ripple++;
    allowed = '0;
    nrep = 0;
    for (int j = 0; j <= NBLK; j++) begin
      lsb = g_lsb[j];
      k   = g_size[j];
      // actual carry into this block
      m  = (longint'(1) << lsb) - 1;
      cb = ((longint'(a) & m) + (longint'(b) & m) + longint'(cin)) >> lsb;
      if (j > 0 && cb[0]) n_sel1++;
      q = fpos[j];
      if (!faulty || q < 0) continue;
      allowed[g_base[j] + q] = 1'b1;
      m  = (longint'(1) << q) - 1;
      low = ((longint'(a) >> lsb) & m) + ((longint'(b) >> lsb) & m);
      if (j == 0) low += longint'(cin);
      ap = (q < k) ? a[lsb + q] : 1'b0;
      bp = (q < k) ? b[lsb + q] : 1'b0;
      cp = low[q];
      fa_ref(ap, bp, cp, fcode[j], es, ec, ee);
      checks++;
      if (ef[g_base[j] + q] !== ee) begin
        failures++;
        $display("FAIL localization block %0d cell %0d code %0d: ef=%b", j, q, fcode[j], ef);
      end
      if (ee && q < k) begin
        nrep++;
        n_blk_rep[j]++;
        if (j == 0) n_rca_rep++;
        if (cp) n_bypass1++;
        if (j > 0 && cb[0] && ((low & m) == m)) n_xhold++;
      end
      if (ee && q == k) n_spare++;
    end
    if (nrep >= 2) n_multi++;
    checks++;
    if ((ef & ~allowed) !== '0 || err !== (ef != '0)) begin
      failures++;
      $display("FAIL false alarm: ef=%b allowed=%b err=%b", ef, allowed, err);
    end
  endtask

  initial begin
    g_lsb[0]  = 0;
    g_size[0] = RCA_BITS;
    g_base[0] = 0;
    for (int j = 1; j <= NBLK; j++) begin
      g_lsb[j]  = blk_lsb(RCA_BITS, FIRST_BLK, j - 1);
      g_size[j] = blk_size(WIDTH, RCA_BITS, FIRST_BLK, j - 1);
      g_base[j] = blk_sfa_base(RCA_BITS, FIRST_BLK, j - 1);
    end
    foreach (n_blk_rep[j]) n_blk_rep[j] = 0;
    foreach (fpos[j]) fpos[j] = -1;
    flt = '{default: FLT_NONE};

    // phase 1: fault-free
    for (int v = 0; v < 5000; v++) begin
      a   = WIDTH'($urandom);
      b   = (v % 4 == 0) ? ~a : WIDTH'($urandom);
      cin = 1'($urandom);
      apply_and_check(1'b0);
    end
    checks++;
    if (n_ripple == 0) begin failures++; $display("full ripple never exercised"); end

    // phase 2: at most one fault per block
    for (int v = 0; v < NVEC; v++) begin
      if (v % 16 == 0) begin
        flt = '{default: FLT_NONE};
        for (int j = 0; j <= NBLK; j++) begin
          if ($urandom_range(3) == 0) fpos[j] = -1;
          else begin
            fpos[j]  = int'($urandom_range(g_size[j]));
            fcode[j] = fault_t'($urandom_range(7, 1));
            flt[g_base[j] + fpos[j]] = fcode[j];
          end
        end
      end
      a   = WIDTH'($urandom);
      b   = (v % 8 == 0) ? ~a : WIDTH'($urandom);
      cin = 1'($urandom);
      apply_and_check(1'b1);
    end

    $display("rca_repairs=%0d spare_faults=%0d multi_block=%0d bypass_carry1=%0d xhold=%0d",
             n_rca_rep, n_spare, n_multi, n_bypass1, n_xhold);
    $display("cin1_selects=%0d full_ripples=%0d", n_sel1, n_ripple);
    for (int j = 0; j <= NBLK; j++) begin
      $display("block %0d: lsb=%0d size=%0d repairs=%0d", j, g_lsb[j], g_size[j], n_blk_rep[j]);
      checks++;
      if (n_blk_rep[j] == 0) begin failures++; $display("no repair in block %0d", j); end
    end
    checks += 6;
    if (n_rca_rep == 0) failures++;
    if (n_spare == 0)   failures++;
    if (n_multi == 0)   failures++;
    if (n_bypass1 == 0) failures++;
    if (n_xhold == 0)   failures++;
    if (n_sel1 == 0)    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
