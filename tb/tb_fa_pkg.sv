// Reference model shared by the testbenches: the outputs of one full adder
// with a given injected fault, worked out from arithmetic (a + b + c) rather
// than from the gate equations used in the design, and whether that fault is
// visible (any of sum, carry, equivalence bit differs from the fault-free
// value) for the given inputs.
package tb_fa_pkg;
  import sra_pkg::*;

  function automatic void fa_ref(input logic a, input logic b, input logic c,
                                 input fault_t flt,
                                 output logic s, output logic co, output logic ef);
    int   tot;
    logic s_ok, co_ok, eq_ok, eq;
    tot   = int'(a) + int'(b) + int'(c);
    s_ok  = tot[0];
    co_ok = tot[1];
    eq_ok = (tot == 0) || (tot == 3);
    s  = s_ok;
    co = co_ok;
    eq = eq_ok;
    case (flt)
      FLT_SUM_SA0:  s  = 1'b0;
      FLT_SUM_SA1:  s  = 1'b1;
      FLT_COUT_SA0: co = 1'b0;
      FLT_COUT_SA1: co = 1'b1;
      FLT_EQT_SA0:  eq = 1'b0;
      FLT_EQT_SA1:  eq = 1'b1;
      FLT_SUM_FLIP: s  = ~s_ok;
      default:      ;
    endcase
    ef = (s != s_ok) || (co != co_ok) || (eq != eq_ok);
  endfunction

endpackage
