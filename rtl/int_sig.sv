// int_sig: signed integrator of the DFLP (numerator of the defuzzifier).
//
// Sums the signed products alpha * singleton of the 2^IP_NO active rules of
// one sample. The rule token's first flag loads the accumulator, later valid
// rules add to it, and the cycle after the last rule the complete sum is
// presented with a one-cycle done strobe. The accumulator register is the
// block's own stage; CPR (cpr8_no, 0 by default) further stages follow it.
module int_sig
  import dflp_pkg::*;
#(
  parameter int CPR = 0
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     valid,
  input  logic                     first,
  input  logic                     last,
  input  logic signed [PROD_W-1:0] d,
  output logic signed [NUM_W-1:0]  sum,
  output logic                     done
);
  logic signed [NUM_W-1:0] acc;
  logic                    done_r;

  always_ff @(posedge clk) begin
    if (rst) begin
      acc    <= '0;
      done_r <= 1'b0;
    end else begin
      done_r <= valid && last;
      if (valid) acc <= (first ? NUM_W'(0) : acc) + NUM_W'(d);
    end
  end

  pipe_delay #(.WIDTH(NUM_W), .DEPTH(CPR)) u_cpr_d (.clk, .rst, .d(acc), .q(sum));
  pipe_delay #(.WIDTH(1), .DEPTH(CPR), .RESET(1'b1)) u_cpr_v (.clk, .rst, .d(done_r), .q(done));
endmodule
