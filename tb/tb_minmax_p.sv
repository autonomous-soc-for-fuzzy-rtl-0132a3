// tb_minmax_p: checks the antecedent connective for all four sel_op modes.
//
// One instance per mode, all with the default CPR = 2. Random degree pairs
// (plus the corner values 0 and 255) are applied and the result, two cycles
// later, is compared with min, (a*b)>>8, max and min(255, a+b-(a*b>>8)).
module tb_minmax_p;
  import dflp_pkg::*;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  mu_t [IP_NO-1:0] a;
  mu_t             y [4];

  for (genvar m = 0; m < 4; m++) begin : g_mode
    minmax_p #(.CPR(2), .SEL_OP(m)) dut (.clk, .rst, .a(a), .y(y[m]));
  end

  function automatic int expect_op(input int m, input int x0, input int x1);
    int p = (x0 * x1) / 256;
    case (m)
      0: return (x0 < x1) ? x0 : x1;
      1: return p;
      2: return (x0 > x1) ? x0 : x1;
      default: return (x0 + x1 - p > 255) ? 255 : x0 + x1 - p;
    endcase
  endfunction

  initial begin
    a = '0;
    repeat (2) @(posedge clk);
    rst = 0;
    for (int i = 0; i < 600; i++) begin
      int x0, x1;
      x0 = (i < 4) ? ((i & 1) ? 255 : 0) : $urandom_range(0, 255);
      x1 = (i < 4) ? ((i & 2) ? 255 : 0) : $urandom_range(0, 255);
      @(negedge clk);
      a[0] = mu_t'(x0); a[1] = mu_t'(x1);
      @(posedge clk); @(posedge clk); #1;
      for (int m = 0; m < 4; m++) begin
        checks++;
        if (int'(y[m]) != expect_op(m, x0, x1)) begin
          failures++;
          if (failures < 10) $display("FAIL mode %0d a=%0d,%0d y=%0d exp %0d", m, x0, x1, y[m], expect_op(m, x0, x1));
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
