// addr_gen_p: active-rule address generator of the DFLP.
//
// The processor handles one active rule per clock. With IP_NO inputs and an
// overlap of two there are 2^IP_NO active rules per sample, so this block
// counts 0 .. 2^IP_NO-1 after each start; bit k of the count selects the
// lower (0) or upper (1) active set of input k. Each count leaves as a rule
// token that also marks the first and last rule of the sample. A start in the
// cycle that issues the last rule chains the next sample without a gap, which
// gives the full rate of one sample every 2^IP_NO clocks.
//
// Interface: start is the accept strobe of the input register; ready says a
// start is allowed now (idle, or issuing the last rule). The token is the
// counter state (the count register is this block's own stage) followed by
// CPR further register stages (cpr1_no).
module addr_gen_p
  import dflp_pkg::*;
#(
  parameter int CPR = 1
) (
  input  logic      clk,
  input  logic      rst,
  input  logic      start,
  output logic      ready,
  output rule_tok_t tok
);
  logic             busy;
  logic [IP_NO-1:0] cnt;
  rule_tok_t        tok_c;

  always_comb begin
    tok_c.valid = busy;
    tok_c.first = busy && (cnt == '0);
    tok_c.last  = busy && (cnt == '1);
    tok_c.rule  = cnt;
    ready       = !busy || (cnt == '1);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      busy <= 1'b0;
      cnt  <= '0;
    end else if (start && ready) begin
      busy <= 1'b1;
      cnt  <= '0;
    end else if (busy) begin
      cnt  <= cnt + 1'b1;
      if (cnt == '1) busy <= 1'b0;
    end
  end

  pipe_delay #(.WIDTH($bits(rule_tok_t)), .DEPTH(CPR), .RESET(1'b1)) u_cpr (
    .clk, .rst, .d(tok_c), .q(tok));

`ifndef SYNTHESIS
  // A token is issued every cycle while busy, and exactly 2^IP_NO per start.
  a_first_after_start: assert property (@(posedge clk) disable iff (rst)
    (start && ready) |=> (tok_c.valid && tok_c.first));
`endif
endmodule
