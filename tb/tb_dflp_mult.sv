// tb_dflp_mult: checks the implication multiplier.
//
// Random and corner strength/singleton pairs; the signed product must appear
// after the CPR = 1 register.
module tb_dflp_mult;
  import dflp_pkg::*;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  mu_t                      alpha;
  cs_t                      s;
  logic signed [PROD_W-1:0] p;

  dflp_mult #(.CPR(1)) dut (.clk, .rst, .alpha, .s, .p);

  initial begin
    alpha = '0; s = '0;
    repeat (2) @(posedge clk);
    rst = 0;
    for (int i = 0; i < 500; i++) begin
      int a, v;
      a = (i < 4) ? ((i & 1) ? 255 : 0) : $urandom_range(0, 255);
      v = (i < 4) ? ((i & 2) ? -128 : 127) : $urandom_range(0, 255) - 128;
      @(negedge clk);
      alpha = mu_t'(a); s = cs_t'(v);
      @(posedge clk); #1;
      checks++;
      if (int'(p) != a * v) begin
        failures++;
        if (failures < 10) $display("FAIL %0d*%0d = %0d", a, v, p);
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
