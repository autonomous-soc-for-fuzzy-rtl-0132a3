// dflp_core: digital fuzzy logic processor (DFLP) for the path tracker.
//
// A zero-order Takagi-Sugeno fuzzy controller in a fixed pipeline. Each input
// has FS_NO (9) trapezoidal/triangular MFs with an overlap of two, so a
// sample fires at most 2^IP_NO (4) of the FS_NO^IP_NO (81) rules. Only those
// active rules are processed, one per clock:
//
//   ip_set -> addr_gen_p (rule counter)  \
//          -> trap_gen_p (fuzzify)       -> rule_sel_p -> minmax_p (AND=min) --\
//                                                       -> cons_map_p -> s_rom -> dflp_mult
//          -> int_uns (sum alpha), int_sig (sum alpha*s) -> div_array -> y
//
// Output: y = 2^FRAC * sum(alpha_r * s_r) / sum(alpha_r) over the active
// rules (weighted average, truncated toward zero), signed OP_SZ bits.
//
// Each component has CPR register stages after its logic (parameters
// CPR1..CPR9, the processor's cpr1_no..cpr9_no). The path synchronisation
// registers (PSR) that realign parallel paths are sized here from the CPR
// values, so every setting stays consistent. With the defaults a rule token
// passes 9 register stages from the input register to y.
//
// Handshake: a sample is taken when in_valid && in_ready. in_ready is high
// when idle and in the cycle the last rule of the previous sample is issued,
// so back-to-back samples are taken every 2^IP_NO clocks. y is valid for one
// cycle with out_valid, LATENCY clocks after the accepting edge:
//   LATENCY = 2^IP_NO + max(CPR1,CPR3) + CPR4 + max(CPR5,CPR2+1) + CPR6
//             + 1 + max(CPR7,CPR8) + CPR9          (= 12 with the defaults)
//
// DIV_TYPE selects the defuzzifier's divider as the processor's div_type
// generic does: 0 the exact restoring array (default), 1 the reciprocal
// look-up divider, which may be one output LSB off.
// The pipeline has no stall; a consumer that may not take y must throttle
// in_valid (flc_ip_top does so).
//
// Follows the processor description: FIS type, widths, overlap, one active
// rule per clock, min AND / product implication / weighted average, CPR5,
// CPR6, CPR7, CPR8, CPR9, the sel_op and div_type options. Our choices: the internal coding of each component,
// CPR1..CPR4 = 1, the derived PSR depths, and the default MF/rule tables.
module dflp_core
  import dflp_pkg::*;
#(
  parameter int        CPR1   = 1,  // addr_gen_p
  parameter int        CPR2   = 1,  // cons_map_p
  parameter int        CPR3   = 1,  // trap_gen_p
  parameter int        CPR4   = 1,  // rule_sel_p
  parameter int        CPR5   = 2,  // minmax_p
  parameter int        CPR6   = 1,  // dflp_mult
  parameter int        CPR7   = 0,  // int_uns
  parameter int        CPR8   = 0,  // int_sig
  parameter int        CPR9   = 2,  // div_array
  parameter int        SEL_OP = SEL_MIN,
  parameter int        DIV_TYPE = 0,  // 0 restoring array, 1 reciprocal LUT
  parameter mf_set_t   MF     = DEFAULT_MF,
  parameter cons_tab_t CONS   = DEFAULT_CONS
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    in_valid,
  output logic                    in_ready,
  input  x_t [IP_NO-1:0]          x,
  output logic                    out_valid,
  output logic signed [OP_SZ-1:0] y
);
  localparam int L1 = (CPR1 > CPR3) ? CPR1 : CPR3;          // addr/trap stage
  localparam int LS = CPR2 + 1;                             // cons_map + ROM
  localparam int L3 = (CPR5 > LS) ? CPR5 : LS;              // minmax || ROM
  localparam int LI = (CPR7 > CPR8) ? CPR7 : CPR8;          // integrators

  // ---- ip_set: input register --------------------------------------------------
  x_t [IP_NO-1:0] x_reg;
  logic           start;

  assign start = in_valid && in_ready;

  always_ff @(posedge clk) begin
    if (rst)        x_reg <= '0;
    else if (start) x_reg <= x;
  end

  // ---- active-rule generation and fuzzification (parallel) --------------------
  rule_tok_t        tok_a, tok1;
  idx_t [IP_NO-1:0] lo_t, lo1;
  mu_t  [IP_NO-1:0] mul_t, muh_t, mul1, muh1;

  addr_gen_p #(.CPR(CPR1)) u_addr_gen (
    .clk, .rst, .start(in_valid), .ready(in_ready), .tok(tok_a));

  for (genvar k = 0; k < IP_NO; k++) begin : g_fz
    trap_gen_p #(.CPR(CPR3), .MF(MF[k])) u_trap_gen (
      .clk, .rst, .x(x_reg[k]), .lo(lo_t[k]), .mu_lo(mul_t[k]), .mu_hi(muh_t[k]));
  end

  // psr1: align the faster of the two paths
  pipe_delay #(.WIDTH($bits(rule_tok_t)), .DEPTH(L1 - CPR1), .RESET(1'b1)) u_psr1_tok (
    .clk, .rst, .d(tok_a), .q(tok1));
  pipe_delay #(.WIDTH(IP_NO*(IDX_W+2*DY)), .DEPTH(L1 - CPR3)) u_psr1_fz (
    .clk, .rst, .d({lo_t, mul_t, muh_t}), .q({lo1, mul1, muh1}));

  // ---- rule selection ---------------------------------------------------------
  rule_tok_t        tok2;
  idx_t [IP_NO-1:0] idx2;
  mu_t  [IP_NO-1:0] alpha2;

  rule_sel_p #(.CPR(CPR4)) u_rule_sel (
    .clk, .rst, .rule(tok1.rule), .lo(lo1), .mu_lo(mul1), .mu_hi(muh1),
    .idx(idx2), .alpha(alpha2));

  pipe_delay #(.WIDTH($bits(rule_tok_t)), .DEPTH(CPR4), .RESET(1'b1)) u_tok2 (
    .clk, .rst, .d(tok1), .q(tok2));

  // ---- firing strength || consequent lookup ------------------------------------
  mu_t               a_m, a3;
  logic [ADDR_W-1:0] caddr;
  cs_t               s_r, s3;
  rule_tok_t         tok3;

  minmax_p #(.CPR(CPR5), .SEL_OP(SEL_OP)) u_minmax (
    .clk, .rst, .a(alpha2), .y(a_m));

  cons_map_p #(.CPR(CPR2)) u_cons_map (.clk, .rst, .idx(idx2), .addr(caddr));

  s_rom #(.CONS(CONS)) u_s_rom (.clk, .addr(caddr), .data(s_r));

  // psr2 / psr3: realign strength and singleton at the multiplier
  pipe_delay #(.WIDTH(DY), .DEPTH(L3 - CPR5)) u_psr_a (.clk, .rst, .d(a_m), .q(a3));
  pipe_delay #(.WIDTH(CS_SZ), .DEPTH(L3 - LS)) u_psr2_s (.clk, .rst, .d(s_r), .q(s3));
  pipe_delay #(.WIDTH($bits(rule_tok_t)), .DEPTH(L3), .RESET(1'b1)) u_tok3 (
    .clk, .rst, .d(tok2), .q(tok3));

  // ---- implication -------------------------------------------------------------
  logic signed [PROD_W-1:0] p4;
  mu_t                      a4;
  rule_tok_t                tok4;

  dflp_mult #(.CPR(CPR6)) u_mult (.clk, .rst, .alpha(a3), .s(s3), .p(p4));

  // psr4: strength waits for the multiplier on its way to int_uns
  pipe_delay #(.WIDTH(DY), .DEPTH(CPR6)) u_psr4 (.clk, .rst, .d(a3), .q(a4));
  pipe_delay #(.WIDTH($bits(rule_tok_t)), .DEPTH(CPR6), .RESET(1'b1)) u_tok4 (
    .clk, .rst, .d(tok3), .q(tok4));

  // ---- integration -------------------------------------------------------------
  logic [DEN_W-1:0]        den_i, den5;
  logic signed [NUM_W-1:0] num_i, num5;
  logic                    done_u, done_s, done5, done5_s;

  int_uns #(.CPR(CPR7)) u_int_uns (
    .clk, .rst, .valid(tok4.valid), .first(tok4.first), .last(tok4.last),
    .d(a4), .sum(den_i), .done(done_u));

  int_sig #(.CPR(CPR8)) u_int_sig (
    .clk, .rst, .valid(tok4.valid), .first(tok4.first), .last(tok4.last),
    .d(p4), .sum(num_i), .done(done_s));

  pipe_delay #(.WIDTH(DEN_W + 1), .DEPTH(LI - CPR7), .RESET(1'b1)) u_psr_u (
    .clk, .rst, .d({done_u, den_i}), .q({done5, den5}));
  pipe_delay #(.WIDTH(NUM_W + 1), .DEPTH(LI - CPR8), .RESET(1'b1)) u_psr_s (
    .clk, .rst, .d({done_s, num_i}), .q({done5_s, num5}));

  // ---- defuzzification -----------------------------------------------------------
  if (DIV_TYPE == 1) begin : g_div_lut
    div_lut #(.CPR(CPR9)) u_div (
      .clk, .rst, .in_valid(done5), .num(num5), .den(den5),
      .out_valid(out_valid), .q(y));
  end else begin : g_div_array
    div_array #(.CPR(CPR9)) u_div (
      .clk, .rst, .in_valid(done5), .num(num5), .den(den5),
      .out_valid(out_valid), .q(y));
  end

`ifndef SYNTHESIS
  a_int_aligned: assert property (@(posedge clk) disable iff (rst) done5 == done5_s);
`endif
endmodule
