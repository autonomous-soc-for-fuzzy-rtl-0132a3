// tb_addr_gen_p: checks the active-rule generator.
//
// Issues isolated starts, back-to-back starts (a new start in the cycle of
// the last rule) and starts refused while busy. For every start the token
// stream (CPR = 1 cycle behind the count) must be exactly rules 0,1,2,3 on
// consecutive cycles, first on rule 0 and last on rule 3, with no token
// between samples unless a new start came.
module tb_addr_gen_p;
  import dflp_pkg::*;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic      start, ready;
  rule_tok_t tok;

  addr_gen_p #(.CPR(1)) dut (.clk, .rst, .start, .ready, .tok);

  // cycle model: rem = rules still to issue from the count register
  int        rem = 0;
  rule_tok_t exp_prev = '0;
  int        accepted = 0, refused = 0, chained = 0;

  always @(posedge clk) begin
    if (rst) begin
      rem = 0;
      exp_prev = '0;
    end else begin
      rule_tok_t now;
      bit        rdy;
      now = '0;
      if (rem > 0) begin
        now.valid = 1'b1;
        now.first = (rem == ACT_RULES);
        now.last  = (rem == 1);
        now.rule  = IP_NO'(ACT_RULES - rem);
      end
      rdy = (rem <= 1);
      checks += 2;
      if (ready !== rdy) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0t ready=%b exp %b", $time, ready, rdy);
      end
      if (tok !== exp_prev) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0t tok=%p exp=%p", $time, tok, exp_prev);
      end
      exp_prev = now;
      if (start && rdy) begin
        accepted++;
        if (rem == 1) chained++;
        rem = ACT_RULES;
      end else begin
        if (start) refused++;
        if (rem > 0) rem--;
      end
    end
  end

  initial begin
    start = 0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      start = ($urandom_range(0, 2) != 0);
    end
    @(negedge clk) start = 0;
    repeat (10) @(posedge clk);
    checks++;
    if (accepted < 20 || refused < 20 || chained < 5) begin
      failures++;
      $display("FAIL coverage accepted=%0d refused=%0d chained=%0d", accepted, refused, chained);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
