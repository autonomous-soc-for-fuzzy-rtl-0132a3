// tb_int_uns: checks the uns integrator of the defuzzifier.
//
// Streams groups of 4 unsigned firing strengths, flagged first/last like the rule
// tokens, with random idle cycles between and inside groups. One cycle after
// the last term the sum of the group must be presented with a single done
// strobe; done must stay low otherwise.
module tb_int_uns;
  import dflp_pkg::*;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic valid, first, last, done;
  mu_t d;
  logic [DEN_W-1:0] sum;

  int_uns #(.CPR(0)) dut (.clk, .rst, .valid, .first, .last, .d, .sum, .done);

  longint exp_sum = 0, acc_m = 0;
  bit     exp_done = 0;
  int     groups = 0;

  // cycle model: compare with the state after the previous edge, then
  // take in this edge's inputs
  always @(posedge clk) begin
    if (!rst) begin
      checks++;
      if (done !== exp_done || (exp_done && longint'(sum) != exp_sum)) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0t done=%b/%b sum=%0d exp %0d", $time, done, exp_done, sum, exp_sum);
      end
      if (exp_done) groups++;
      exp_done = valid && last;
      if (valid) begin
        acc_m = (first ? 0 : acc_m) + longint'(d);
        exp_sum = acc_m;
      end
    end
  end

  initial begin
    valid = 0; first = 0; last = 0; d = '0;
    repeat (2) @(posedge clk);
    rst = 0;
    for (int g = 0; g < 150; g++) begin
      for (int r = 0; r < 4; r++) begin
        int v;
        v = $urandom_range(0, 255);
        @(negedge clk);
        valid = 1; first = (r == 0); last = (r == 3); d = mu_t'(v);
        @(posedge clk); #1;
        if ($urandom_range(0, 3) == 0) begin
          @(negedge clk);
          valid = 0; first = 0; last = 0; d = '1;
          @(posedge clk); #1;
        end
      end
    end
    @(negedge clk);
    valid = 0;
    repeat (3) @(posedge clk);
    checks++;
    if (groups != 150) begin
      failures++;
      $display("FAIL groups=%0d", groups);
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
