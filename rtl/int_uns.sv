// int_uns: unsigned integrator of the DFLP (denominator of the defuzzifier).
//
// Sums the firing strengths of the 2^IP_NO active rules of one sample. The
// rule token's first flag loads the accumulator, later valid rules add to
// it, and the cycle after the last rule the complete sum is presented with a
// one-cycle done strobe. The accumulator register is the block's own stage;
// CPR (cpr7_no, 0 by default) further stages follow it.
module int_uns
  import dflp_pkg::*;
#(
  parameter int CPR = 0
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             valid,
  input  logic             first,
  input  logic             last,
  input  mu_t              d,
  output logic [DEN_W-1:0] sum,
  output logic             done
);
  logic [DEN_W-1:0] acc;
  logic             done_r;

  always_ff @(posedge clk) begin
    if (rst) begin
      acc    <= '0;
      done_r <= 1'b0;
    end else begin
      done_r <= valid && last;
      if (valid) acc <= (first ? '0 : acc) + DEN_W'(d);
    end
  end

  pipe_delay #(.WIDTH(DEN_W), .DEPTH(CPR)) u_cpr_d (.clk, .rst, .d(acc), .q(sum));
  pipe_delay #(.WIDTH(1), .DEPTH(CPR), .RESET(1'b1)) u_cpr_v (.clk, .rst, .d(done_r), .q(done));
endmodule
