// tb_trap_gen_p: checks the fuzzifier of one input.
//
// Part 1 sweeps every input code (and extra random ones) through the default
// MF table and compares the active pair and both degrees with the hand-derived
// closed form of tb_ref_pkg, CPR = 1 cycle later. Part 2 loads a table of
// trapezoids with plateaus and unequal edges and checks it against a direct
// piecewise evaluation with exact integer division, allowing the one-code
// rounding of the slope coding.
module tb_trap_gen_p;
  import dflp_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  x_t   x, x2;
  idx_t lo, lo2;
  mu_t  ml, mh, ml2, mh2;

  trap_gen_p #(.CPR(1)) dut (.clk, .rst, .x(x), .lo(lo), .mu_lo(ml), .mu_hi(mh));

  // Trapezoid table: set k feet at 400k-100 .. 400k+300, plateau 400k+50..400k+150
  function automatic mf_tab_t trap_tab();
    mf_tab_t t;
    for (int k = 0; k < FS_NO; k++) begin
      int a = (k == 0) ? 0 : 400 * k - 100;
      int b = (k == 0) ? 0 : 400 * k + 50;
      int c = 400 * k + 150;
      int d = (k == FS_NO - 1) ? 4095 : 400 * k + 300;
      t[k] = make_mf(a, b, c, d);
    end
    return t;
  endfunction
  localparam mf_tab_t TT = trap_tab();

  trap_gen_p #(.CPR(0), .MF(TT)) dut2 (.clk, .rst, .x(x2), .lo(lo2), .mu_lo(ml2), .mu_hi(mh2));

  function automatic int exact_mu(input int k, input int v);
    int a = (k == 0) ? 0 : 400 * k - 100;
    int b = (k == 0) ? 0 : 400 * k + 50;
    int c = 400 * k + 150;
    int d = (k == FS_NO - 1) ? 4095 : 400 * k + 300;
    if (v < a || v > d) return 0;
    if (v >= b && v <= c) return 255;
    if (v < b) return (v - a) * 255 / (b - a);
    return (d - v) * 255 / (d - c);
  endfunction

  function automatic bit close(input int got, input int want);
    return (got - want <= 1) && (want - got <= 1);
  endfunction

  task automatic check_default(input int v);
    int l;
    x = x_t'(v);
    @(posedge clk); #1;
    l = ref_lo(v);
    checks++;
    if (int'(lo) != l || int'(ml) != ref_mu(l, v) || int'(mh) != ref_mu(l + 1, v)) begin
      failures++;
      if (failures < 10) $display("FAIL x=%0d lo=%0d/%0d mu=%0d,%0d exp %0d,%0d",
        v, lo, l, ml, mh, ref_mu(l, v), ref_mu(l + 1, v));
    end
  endtask

  initial begin
    x = '0; x2 = '0;
    repeat (2) @(posedge clk);
    rst = 0;
    for (int v = 0; v < 4096; v++) check_default(v);
    for (int i = 0; i < 500; i++) check_default($urandom_range(0, 4095));
    // trapezoid table, combinational instance
    for (int v = 0; v < 4096; v += 3) begin
      int l;
      x2 = x_t'(v); #1;
      l = 0;
      for (int k = 1; k < FS_NO; k++) if (400 * k - 100 <= v) l = k;
      l = (l == 0) ? 0 : l - 1;
      if (l > FS_NO - 2) l = FS_NO - 2;
      checks++;
      if (int'(lo2) != l || !close(int'(ml2), exact_mu(l, v)) || !close(int'(mh2), exact_mu(l + 1, v))) begin
        failures++;
        if (failures < 10) $display("FAIL trap x=%0d lo=%0d/%0d mu=%0d,%0d exp %0d,%0d",
          v, lo2, l, ml2, mh2, exact_mu(l, v), exact_mu(l + 1, v));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
