// cons_map_p: consequent mapper of the DFLP.
//
// Turns the fuzzy-set indices of a rule's antecedents into the address of
// its singleton in the consequent ROM: a mixed-radix number with input 0 as
// the least significant digit, addr = sum_k idx_k * FS_NO^k, which spans the
// complete rule base of FS_NO^IP_NO (81) rules. The mapping is this design's
// choice. Timing: combinational, then CPR register stages (cpr2_no).
module cons_map_p
  import dflp_pkg::*;
#(
  parameter int CPR = 1
) (
  input  logic               clk,
  input  logic               rst,
  input  idx_t [IP_NO-1:0]   idx,
  output logic [ADDR_W-1:0]  addr
);
  logic [ADDR_W-1:0] addr_c;

  always_comb begin
    addr_c = '0;
    for (int k = IP_NO - 1; k >= 0; k--)
      addr_c = ADDR_W'(addr_c * FS_NO) + ADDR_W'(idx[k]);
  end

  pipe_delay #(.WIDTH(ADDR_W), .DEPTH(CPR)) u_cpr (.clk, .rst, .d(addr_c), .q(addr));
endmodule
