// minmax_p: antecedent connective of the DFLP.
//
// Combines the degrees of truth of a rule's IP_NO antecedents into the rule's
// firing strength. SEL_OP picks the operator as in the processor's sel_op
// generic: 0 minimum (the t-norm used by the path tracker), 1 product,
// 2 maximum, 3 probabilistic OR. With 1.0 coded as 2^DY-1, product and
// probabilistic OR are rescaled by >> DY and the latter saturates at 1.0
// (our choice of scaling).
// Timing: combinational, then CPR register stages (cpr5_no = 2).
module minmax_p
  import dflp_pkg::*;
#(
  parameter int CPR    = 2,
  parameter int SEL_OP = SEL_MIN
) (
  input  logic            clk,
  input  logic            rst,
  input  mu_t [IP_NO-1:0] a,
  output mu_t             y
);
  mu_t y_c;

  always_comb begin
    logic [2*DY-1:0] p;
    logic [DY:0]     sum;
    y_c = a[0];
    for (int k = 1; k < IP_NO; k++) begin
      p = a[k] * y_c;
      case (SEL_OP)
        SEL_MIN:  y_c = (a[k] < y_c) ? a[k] : y_c;
        SEL_PROD: y_c = mu_t'(p >> DY);
        SEL_MAX:  y_c = (a[k] > y_c) ? a[k] : y_c;
        default: begin
          sum = ({1'b0, a[k]} + {1'b0, y_c}) - (DY+1)'(p >> DY);
          y_c = sum[DY] ? MU_ONE : sum[DY-1:0];
        end
      endcase
    end
  end

  pipe_delay #(.WIDTH(DY), .DEPTH(CPR)) u_cpr (.clk, .rst, .d(y_c), .q(y));
endmodule
