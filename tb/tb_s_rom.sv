// tb_s_rom: checks the consequent ROM.
//
// Reads all 81 entries of the default rule table in random order and checks
// the one-cycle read latency and each singleton against the rule surface
// clamp(40*((i1-4)+(i2-4))) with address = i1 + 9*i2.
module tb_s_rom;
  import dflp_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [ADDR_W-1:0] addr;
  cs_t               data;

  s_rom dut (.clk, .addr, .data);

  initial begin
    addr = '0;
    @(posedge clk);
    for (int i = 0; i < 300; i++) begin
      int a;
      a = (i < N_RULES) ? i : $urandom_range(0, N_RULES - 1);
      @(negedge clk);
      addr = ADDR_W'(a);
      @(posedge clk); #1;
      checks++;
      if (int'(data) != ref_cons(a % 9, a / 9)) begin
        failures++;
        if (failures < 10) $display("FAIL addr=%0d data=%0d exp %0d", a, data, ref_cons(a % 9, a / 9));
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
