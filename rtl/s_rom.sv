// s_rom: consequent singleton ROM of the DFLP.
//
// Holds one signed CS_SZ-bit singleton per rule of the complete rule base
// (FS_NO^IP_NO = 81 rules of 8 bits for the path tracker) and is read with one
// clock of latency, as a synchronous FPGA ROM would be. The contents are the
// parameter CONS; the default is the placeholder rule surface of dflp_pkg,
// to be replaced by the rule table of the controller being built.
module s_rom
  import dflp_pkg::*;
#(
  parameter cons_tab_t CONS = DEFAULT_CONS
) (
  input  logic              clk,
  input  logic [ADDR_W-1:0] addr,
  output cs_t               data
);
  cs_t rom [N_RULES];

  always_comb
    for (int r = 0; r < N_RULES; r++) rom[r] = CONS[r];

  always_ff @(posedge clk)
    data <= (int'(addr) < N_RULES) ? rom[addr] : '0;
endmodule
