// tb_rule_sel_p: checks the rule selector.
//
// Random rule numbers, lower-set indices and degree pairs; after the CPR = 1
// register the set index of input k must be lo_k (rule bit 0) or lo_k + 1
// (rule bit 1) and the degree the matching mu_lo_k / mu_hi_k.
module tb_rule_sel_p;
  import dflp_pkg::*;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [IP_NO-1:0] rule;
  idx_t [IP_NO-1:0] lo, idx;
  mu_t  [IP_NO-1:0] mul, muh, alpha;

  rule_sel_p #(.CPR(1)) dut (.clk, .rst, .rule, .lo, .mu_lo(mul), .mu_hi(muh), .idx, .alpha);

  initial begin
    rule = '0; lo = '0; mul = '0; muh = '0;
    repeat (2) @(posedge clk);
    rst = 0;
    for (int i = 0; i < 400; i++) begin
      int el [IP_NO];
      int ea [IP_NO];
      @(negedge clk);
      rule = IP_NO'($urandom);
      for (int k = 0; k < IP_NO; k++) begin
        lo[k]  = idx_t'($urandom_range(0, FS_NO - 2));
        mul[k] = mu_t'($urandom);
        muh[k] = mu_t'($urandom);
        el[k]  = int'(lo[k]) + (rule[k] ? 1 : 0);
        ea[k]  = rule[k] ? int'(muh[k]) : int'(mul[k]);
      end
      @(posedge clk); #1;
      for (int k = 0; k < IP_NO; k++) begin
        checks++;
        if (int'(idx[k]) != el[k] || int'(alpha[k]) != ea[k]) begin
          failures++;
          if (failures < 10) $display("FAIL k=%0d idx=%0d/%0d alpha=%0d/%0d", k, idx[k], el[k], alpha[k], ea[k]);
        end
      end
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
