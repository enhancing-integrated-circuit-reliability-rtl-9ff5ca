// sfa: self-checking full adder.
//
// Three independent circuits compute, from the same inputs a, b, cin:
//   Sum  = ~(a ^ ~(b ^ cin))                            (= a ^ b ^ cin)
//   Cout = ~((~(a ^ cin) & ~a) | ((a ^ cin) & ~b))      (majority)
//   Eqt  = ~((a ^ b) | (a ^ cin))                       (1 when a == b == cin)
// The checker uses the full-adder property "if a == b == cin then
// Sum ^ Cout == 0, else Sum ^ Cout == 1": the property is broken exactly when
// Sum ^ Cout equals Eqt, so ef = ~(Sum ^ Cout) ^ Eqt (two gates, g1 and g2
// below). Any single
// wrong output of the three circuits raises ef for exactly the input patterns
// where that output is wrong, independently of the carry arriving from below.
// The three equations and the checking property follow the source design;
// Sum and Cout are kept as separate circuits so that one fault cannot hit
// both. (The source builds them from pass transistors; here they are logic.)
//
// flt is a fault-injection input of this implementation (see sra_pkg); tie it
// to FLT_NONE in normal use. Purely combinational, no clock.
module sfa
  import sra_pkg::*;
(
  input  logic   a,
  input  logic   b,
  input  logic   cin,
  input  fault_t flt,
  output logic   sum,
  output logic   cout,
  output logic   ef
);

  logic sum_ok, cout_ok, eqt_ok, eqt, g1;

  always_comb begin
    sum_ok  = ~(a ^ ~(b ^ cin));
    cout_ok = ~((~(a ^ cin) & ~a) | ((a ^ cin) & ~b));
    eqt_ok  = ~((a ^ b) | (a ^ cin));

    sum  = sum_ok;
    cout = cout_ok;
    eqt  = eqt_ok;
    unique case (flt)
      FLT_NONE:     ;
      FLT_SUM_SA0:  sum  = 1'b0;
      FLT_SUM_SA1:  sum  = 1'b1;
      FLT_COUT_SA0: cout = 1'b0;
      FLT_COUT_SA1: cout = 1'b1;
      FLT_EQT_SA0:  eqt  = 1'b0;
      FLT_EQT_SA1:  eqt  = 1'b1;
      FLT_SUM_FLIP: sum  = ~sum_ok;
      default:      ;
    endcase

    g1 = ~(sum ^ cout);
    ef = g1 ^ eqt;        // error flag
  end

endmodule
