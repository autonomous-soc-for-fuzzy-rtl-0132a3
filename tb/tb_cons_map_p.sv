// tb_cons_map_p: checks the consequent mapper on every index pair.
//
// All 81 (i1, i2) pairs must map, after the CPR = 1 register, to the
// distinct addresses i1 + 9*i2 in 0..80.
module tb_cons_map_p;
  import dflp_pkg::*;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  idx_t [IP_NO-1:0]  idx;
  logic [ADDR_W-1:0] addr;
  bit                seen [N_RULES];

  cons_map_p #(.CPR(1)) dut (.clk, .rst, .idx, .addr);

  initial begin
    idx = '0;
    repeat (2) @(posedge clk);
    rst = 0;
    for (int i2 = 0; i2 < 9; i2++)
      for (int i1 = 0; i1 < 9; i1++) begin
        @(negedge clk);
        idx[0] = idx_t'(i1); idx[1] = idx_t'(i2);
        @(posedge clk); #1;
        checks++;
        if (int'(addr) != i1 + 9 * i2 || seen[addr]) begin
          failures++;
          if (failures < 10) $display("FAIL i1=%0d i2=%0d addr=%0d", i1, i2, addr);
        end
        seen[addr] = 1'b1;
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
