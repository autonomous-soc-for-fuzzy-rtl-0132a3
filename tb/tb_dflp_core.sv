// tb_dflp_core: end-to-end check of the fuzzy processor core.
//
// Two cores see the same input stream: one with the default pipeline
// (CPR1..9 = 1,1,1,1,2,1,0,0,2) and the default rule table, and one with a
// different set of pipeline depths (0,2,2,0,1,0,1,0,0), which exercises the
// derived path synchronisation registers, and an asymmetric rule table
// that tells the two inputs apart. A third core uses the reciprocal look-up
// divider (DIV_TYPE = 1) and must match the reference within one LSB. Inputs are random pairs plus the universe
// corners and MF centres, offered back to back and with random gaps.
// Each output must equal the reference weighted average of tb_ref_pkg and
// arrive exactly 12 (default) or 11 (second set) clocks after the accepting
// edge; back-to-back samples must be accepted every 4 clocks.
module tb_dflp_core;
  import dflp_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int LAT_A = 12;
  localparam int LAT_B = 11;

  logic             in_valid, rdy_a, rdy_b, ov_a, ov_b;
  x_t [IP_NO-1:0]   x;
  logic signed [OP_SZ-1:0] y_a, y_b, y_c;
  logic             rdy_c, ov_c;

  dflp_core dut_a (.clk, .rst, .in_valid, .in_ready(rdy_a), .x, .out_valid(ov_a), .y(y_a));
  function automatic cons_tab_t cons_b();
    cons_tab_t t;
    for (int r = 0; r < N_RULES; r++) t[r] = cs_t'(ref_cons_b(r % 9, r / 9));
    return t;
  endfunction

  dflp_core #(.CONS(cons_b()), .CPR1(0), .CPR2(2), .CPR3(2), .CPR4(0), .CPR5(1), .CPR6(0),
              .CPR7(1), .CPR8(0), .CPR9(0))
    dut_b (.clk, .rst, .in_valid, .in_ready(rdy_b), .x, .out_valid(ov_b), .y(y_b));

  dflp_core #(.DIV_TYPE(1))
    dut_c (.clk, .rst, .in_valid, .in_ready(rdy_c), .x, .out_valid(ov_c), .y(y_c));

  longint cyc = 0;
  int     qc_i = 0, lut_off = 0;
  longint acc_t [$];
  int     acc_y [$];
  int     acc_yb [$];
  int     qa_i = 0, qb_i = 0;
  longint last_acc = -100;
  int     gaps4 = 0, accepted = 0;

  always @(posedge clk) begin
    cyc++;
    if (!rst) begin
      checks++;
      if (rdy_a !== rdy_b) begin
        failures++;
        $display("FAIL ready differs");
      end
      if (ov_a) begin
        checks++;
        if (qa_i >= acc_y.size() || int'(y_a) != acc_y[qa_i] || cyc - acc_t[qa_i] != LAT_A) begin
          failures++;
          if (failures < 10) $display("FAIL A #%0d y=%0d exp %0d lat=%0d", qa_i, y_a,
                                      acc_y[qa_i], cyc - acc_t[qa_i]);
        end
        qa_i++;
      end
      if (ov_b) begin
        checks++;
        if (qb_i >= acc_y.size() || int'(y_b) != acc_yb[qb_i] || cyc - acc_t[qb_i] != LAT_B) begin
          failures++;
          if (failures < 10) $display("FAIL B #%0d y=%0d exp %0d lat=%0d", qb_i, y_b,
                                      acc_yb[qb_i], cyc - acc_t[qb_i]);
        end
        qb_i++;
      end
      if (ov_c) begin
        checks++;
        if (qc_i >= acc_y.size() || int'(y_c) - acc_y[qc_i] > 1 || acc_y[qc_i] - int'(y_c) > 1
            || cyc - acc_t[qc_i] != LAT_A) begin
          failures++;
          if (failures < 10) $display("FAIL C #%0d y=%0d exp %0d lat=%0d", qc_i, y_c,
                                      acc_y[qc_i], cyc - acc_t[qc_i]);
        end
        if (int'(y_c) != acc_y[qc_i]) lut_off++;
        qc_i++;
      end
      if (in_valid && rdy_a) begin
        if (cyc - last_acc == ACT_RULES) gaps4++;
        checks++;
        if (cyc - last_acc < ACT_RULES) begin
          failures++;
          $display("FAIL accepted after %0d cycles", cyc - last_acc);
        end
        last_acc = cyc;
        accepted++;
        acc_t.push_back(cyc);
        acc_y.push_back(ref_dflp(int'(x[0]), int'(x[1])));
        acc_yb.push_back(ref_dflp(int'(x[0]), int'(x[1]), 1'b1));
      end
    end
  end

  initial begin
    int n = 0;
    in_valid = 0; x = '0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    while (n < 2000) begin
      @(negedge clk);
      if (!(in_valid && !rdy_a)) begin
        // new sample once the previous one was taken
        if (n < 81) begin
          x[0] = x_t'(ref_ctr(n % 9)); x[1] = x_t'(ref_ctr(n / 9));
        end else begin
          x[0] = x_t'($urandom_range(0, 4095)); x[1] = x_t'($urandom_range(0, 4095));
        end
        in_valid = (n < 400) || ($urandom_range(0, 4) != 0);
        if (in_valid) n++;
      end
      #1;
    end
    @(negedge clk);
    while (!rdy_a) @(negedge clk);
    in_valid = 0;
    repeat (20) @(posedge clk);
    checks++;
    $display("reciprocal-LUT results one LSB off: %0d of %0d", lut_off, qc_i);
    if (qa_i != accepted || qb_i != accepted || qc_i != accepted || gaps4 < 100) begin
      failures++;
      $display("FAIL outputs %0d/%0d of %0d, back-to-back %0d", qa_i, qb_i, accepted, gaps4);
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
