// rule_sel_p: rule selector of the DFLP.
//
// For the active rule in hand, picks per input the fuzzy-set index and the
// degree of truth: rule bit k = 0 takes input k's lower active set (lo_k,
// mu_lo_k), 1 takes the upper one (lo_k + 1, mu_hi_k). The indices go on to
// the consequent mapper, the degrees to the antecedent connective.
// The selection scheme is this design's; the block's place in the pipeline
// follows the processor's component list. Timing: combinational, then CPR
// register stages (cpr4_no).
module rule_sel_p
  import dflp_pkg::*;
#(
  parameter int CPR = 1
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic [IP_NO-1:0]      rule,
  input  idx_t [IP_NO-1:0]      lo,
  input  mu_t  [IP_NO-1:0]      mu_lo,
  input  mu_t  [IP_NO-1:0]      mu_hi,
  output idx_t [IP_NO-1:0]      idx,
  output mu_t  [IP_NO-1:0]      alpha
);
  idx_t [IP_NO-1:0] idx_c;
  mu_t  [IP_NO-1:0] alpha_c;

  always_comb begin
    for (int k = 0; k < IP_NO; k++) begin
      idx_c[k]   = rule[k] ? lo[k] + idx_t'(1) : lo[k];
      alpha_c[k] = rule[k] ? mu_hi[k] : mu_lo[k];
    end
  end

  pipe_delay #(.WIDTH(IP_NO*(IDX_W+DY)), .DEPTH(CPR)) u_cpr (
    .clk, .rst, .d({idx_c, alpha_c}), .q({idx, alpha}));
endmodule
