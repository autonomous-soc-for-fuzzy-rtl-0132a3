// dflp_mult: implication multiplier of the DFLP.
//
// Zero-order Takagi-Sugeno implication by product: the rule's firing
// strength alpha (unsigned, DY bits) times the rule's singleton s (signed,
// CS_SZ bits) gives a signed DY+CS_SZ+1-bit term of the weighted sum.
// Timing: combinational, then CPR register stages (cpr6_no = 1).
module dflp_mult
  import dflp_pkg::*;
#(
  parameter int CPR = 1
) (
  input  logic                      clk,
  input  logic                      rst,
  input  mu_t                       alpha,
  input  cs_t                       s,
  output logic signed [PROD_W-1:0]  p
);
  logic signed [PROD_W-1:0] p_c;

  assign p_c = $signed({1'b0, alpha}) * s;

  pipe_delay #(.WIDTH(PROD_W), .DEPTH(CPR)) u_cpr (.clk, .rst, .d(p_c), .q(p));
endmodule
