// dflp_pkg: configuration constants, shared types and default tables of the
// digital fuzzy logic processor (DFLP).
//
// The DFLP is configured the way a generics package configures it: number of
// inputs, input/output widths, fuzzy sets per input, degree-of-truth width and
// consequent (singleton) width are constants here and every module takes its
// widths from them. The values are the ones of the path-tracking processor:
// 2 inputs of 12 bits, 9 membership functions (MFs) per input, 8-bit degrees
// of truth, 81 signed 8-bit singletons and one 12-bit signed output.
//
// A membership function is a trapezoid a <= b <= c <= d (a triangle when
// b == c) plus two precomputed slopes, so that the fuzzifier needs a
// multiplier but no divider:
//   s_up = round((2^DY-1) * 2^SL_FRAC / (b - a)),  s_dn likewise with (d - c).
// The default MF table (our choice; the tracker's own breakpoints are not
// published) is FS_NO evenly spaced triangles over 0..2^IP_SZ-1 with
// shoulders at both ends, overlap two. The default rule table (a placeholder
// surface, also our choice) is
//   singleton(i1, i2) = clamp(40 * ((i1 - 4) + (i2 - 4)), -128, 127).
package dflp_pkg;

  // ---- configuration (generics) -------------------------------------------
  localparam int IP_NO   = 2;              // number of inputs
  localparam int IP_SZ   = 12;             // input bus width
  localparam int OP_SZ   = 12;             // output bus width (signed)
  localparam int FS_NO   = 9;              // fuzzy sets per input
  localparam int DY      = 8;              // degree-of-truth width
  localparam int CS_SZ   = 8;              // singleton width (signed)
  localparam int SL_W    = 16;             // slope word width
  localparam int SL_FRAC = 8;              // slope fraction bits
  localparam int IDX_W   = $clog2(FS_NO);  // set index width
  localparam int N_RULES = FS_NO ** IP_NO; // size of the rule base (81)
  localparam int ADDR_W  = $clog2(N_RULES);
  localparam int ACT_RULES = 2 ** IP_NO;   // active rules per sample (4)
  localparam int PROD_W  = DY + CS_SZ + 1; // signed alpha*singleton width
  localparam int NUM_W   = PROD_W + IP_NO; // signed sum of products
  localparam int DEN_W   = DY + IP_NO;     // unsigned sum of strengths
  localparam int FRAC    = OP_SZ - CS_SZ;  // output fraction bits (4)

  localparam logic [DY-1:0] MU_ONE = {DY{1'b1}}; // degree of truth 1.0

  // Antecedent connective selection (sel_op)
  typedef enum int {SEL_MIN = 0, SEL_PROD = 1, SEL_MAX = 2, SEL_PROBOR = 3} sel_op_e;

  // ---- types ----------------------------------------------------------------
  typedef logic [IP_SZ-1:0]        x_t;
  typedef logic [DY-1:0]           mu_t;
  typedef logic [IDX_W-1:0]        idx_t;
  typedef logic signed [CS_SZ-1:0] cs_t;

  typedef struct packed {
    x_t               a, b, c, d;   // feet and shoulders
    logic [SL_W-1:0]  s_up, s_dn;   // rising / falling slopes
  } mf_t;

  typedef mf_t [FS_NO-1:0]        mf_tab_t;   // MFs of one input
  typedef mf_tab_t [IP_NO-1:0]    mf_set_t;   // MFs of all inputs
  typedef cs_t [N_RULES-1:0]      cons_tab_t; // rule base singletons

  // One active rule travelling down the pipeline.
  typedef struct packed {
    logic             valid;
    logic             first;   // first active rule of a sample
    logic             last;    // last active rule of a sample
    logic [IP_NO-1:0] rule;    // bit k: 0 lower, 1 upper active set of input k
  } rule_tok_t;

  // ---- default tables ---------------------------------------------------------
  function automatic logic [SL_W-1:0] slope(input int run);
    int s;
    if (run <= 0) return '0;
    s = ((2 ** DY - 1) * (2 ** SL_FRAC) + run / 2) / run;
    if (s > 2 ** SL_W - 1) s = 2 ** SL_W - 1;
    return SL_W'(s);
  endfunction

  function automatic mf_t make_mf(input int a, input int b, input int c, input int d);
    mf_t m;
    m.a = x_t'(a); m.b = x_t'(b); m.c = x_t'(c); m.d = x_t'(d);
    m.s_up = slope(b - a);
    m.s_dn = slope(d - c);
    return m;
  endfunction

  function automatic mf_tab_t default_mf_tab();
    mf_tab_t t;
    int      xmax = 2 ** IP_SZ - 1;
    int      step = (2 ** IP_SZ) / (FS_NO - 1);
    for (int k = 0; k < FS_NO; k++) begin
      int ctr = (k * step > xmax) ? xmax : k * step;
      int lft = (k == 0) ? 0 : (k - 1) * step;
      int rgt = (k == FS_NO - 1) ? xmax : (((k + 1) * step > xmax) ? xmax : (k + 1) * step);
      t[k] = make_mf(lft, ctr, ctr, rgt);
    end
    return t;
  endfunction

  function automatic mf_set_t default_mf_set();
    mf_set_t s;
    for (int i = 0; i < IP_NO; i++) s[i] = default_mf_tab();
    return s;
  endfunction

  function automatic cons_tab_t default_cons_tab();
    cons_tab_t t;
    for (int r = 0; r < N_RULES; r++) begin
      int sum = 0;
      int rr  = r;
      for (int i = 0; i < IP_NO; i++) begin
        sum += (rr % FS_NO) - FS_NO / 2;
        rr  /= FS_NO;
      end
      sum *= 40;
      if (sum > 127) sum = 127;
      if (sum < -128) sum = -128;
      t[r] = cs_t'(sum);
    end
    return t;
  endfunction

  localparam mf_set_t   DEFAULT_MF   = default_mf_set();
  localparam cons_tab_t DEFAULT_CONS = default_cons_tab();

endpackage
