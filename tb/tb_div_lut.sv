// tb_div_lut: checks the reciprocal look-up divider.
//
// Feeds random signed numerators and unsigned denominators over the full
// ranges the defuzzifier produces (|num| <= 4*255*128, den <= 4*255), plus
// zero and saturating cases, and checks q = trunc(16*num/den) clipped to
// -2048..2047 (0 for den = 0) to within one LSB, including a sweep of every
// denominator with an average of +-127, and out_valid exactly CPR = 2
// cycles after in_valid.
module tb_div_lut;
  import dflp_pkg::*;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic                    in_valid, out_valid;
  logic signed [NUM_W-1:0] num;
  logic [DEN_W-1:0]        den;
  logic signed [OP_SZ-1:0] q;

  div_lut #(.CPR(2)) dut (.clk, .rst, .in_valid, .num, .den, .out_valid, .q);

  function automatic int ref_q(input longint n, input longint d);
    longint r;
    if (d == 0) return 0;
    r = (n * 16) / d;
    if (r > 2047) r = 2047;
    if (r < -2048) r = -2048;
    return int'(r);
  endfunction

  int  exp_q [$];
  bit  exp_v [$];
  int  sat = 0;

  always @(posedge clk) begin
    if (!rst) begin
      exp_v.push_back(in_valid);
      exp_q.push_back(ref_q(longint'(num), longint'(den)));
      if (exp_v.size() > 2) begin
        bit v; int e;
        v = exp_v.pop_front(); e = exp_q.pop_front();
        checks++;
        if (out_valid !== v || (v && (int'(q) - e > 1 || e - int'(q) > 1))) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0t v=%b/%b q=%0d exp %0d", $time, out_valid, v, q, e);
        end
      end
    end
  end

  initial begin
    in_valid = 0; num = '0; den = '0;
    repeat (2) @(posedge clk);
    rst = 0;
    for (int i = 0; i < 3000; i++) begin
      int n, d;
      @(negedge clk);
      d = $urandom_range(0, 1020);
      n = $urandom_range(0, 2 * 130560) - 130560;
      if (i % 7 == 0) n = n % (128 * (d + 1));       // in-range averages
      if (i == 1) begin n = 4 * 255 * 127; d = 1; end // positive saturation
      if (i == 2) begin n = -4 * 255 * 128; d = 3; end // negative saturation
      if (i == 3) begin n = -1000; d = 0; end
      if (i == 4) begin n = -255 * 128; d = 255; end  // exactly -2048
      if (ref_q(n, d) == 2047 || ref_q(n, d) == -2048) sat++;
      if (i >= 5 && i < 1029) begin n = (i % 3 == 0) ? -127 * (i - 5) : 127 * (i - 5); d = i - 5; end
      in_valid = ($urandom_range(0, 3) != 0);
      num = NUM_W'(n); den = DEN_W'(d);
    end
    @(negedge clk) in_valid = 0;
    repeat (4) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
