// trap_gen_p: fuzzifier of one DFLP input (trapezoidal/triangular MFs).
//
// With an overlap of two, at most two adjacent fuzzy sets are active for any
// input value. The block finds the lower one, lo = max(0, n - 1) where n is
// the number of sets k >= 1 whose left foot a_k is <= x, and evaluates the
// degrees of truth of sets lo and lo+1. Each degree is piecewise linear:
// 0 outside [a,d], 2^DY-1 on the plateau [b,c], ((x-a)*s_up) >> SL_FRAC on
// the rising edge and ((d-x)*s_dn) >> SL_FRAC on the falling edge, saturated
// to 2^DY-1. Slopes come precomputed with the MF table, so one multiplier per
// degree and no divider is needed.
//
// The overlap-of-two rule and the 8-bit degree of truth follow the processor
// specification; the active-set search and slope coding are this design's.
// Timing: combinational, followed by CPR register stages (cpr3_no).
module trap_gen_p
  import dflp_pkg::*;
#(
  parameter int      CPR = 1,
  parameter mf_tab_t MF  = DEFAULT_MF[0]
) (
  input  logic clk,
  input  logic rst,
  input  x_t   x,
  output idx_t lo,
  output mu_t  mu_lo,
  output mu_t  mu_hi
);
  function automatic mu_t degree(input mf_t m, input x_t v);
    logic [IP_SZ+SL_W-1:0] p;
    logic [IP_SZ+SL_W-1:0] s;
    if (v < m.a || v > m.d) return '0;
    if (v >= m.b && v <= m.c) return MU_ONE;
    if (v < m.b) p = (IP_SZ+SL_W)'(v - m.a) * (IP_SZ+SL_W)'(m.s_up);
    else         p = (IP_SZ+SL_W)'(m.d - v) * (IP_SZ+SL_W)'(m.s_dn);
    s = p >> SL_FRAC;
    return (s > (IP_SZ+SL_W)'(MU_ONE)) ? MU_ONE : mu_t'(s);
  endfunction

  idx_t lo_c;
  mu_t  mu_lo_c, mu_hi_c;

  always_comb begin
    int n;
    n = 0;
    for (int k = 1; k < FS_NO; k++)
      if (MF[k].a <= x) n++;
    lo_c    = (n == 0) ? '0 : idx_t'(n - 1);
    mu_lo_c = degree(MF[lo_c], x);
    mu_hi_c = degree(MF[lo_c + idx_t'(1)], x);
  end

  pipe_delay #(.WIDTH(IDX_W + 2*DY), .DEPTH(CPR)) u_cpr (
    .clk, .rst, .d({lo_c, mu_lo_c, mu_hi_c}), .q({lo, mu_lo, mu_hi}));
endmodule
