// tb_flc_ip_top: end-to-end test of the FSL fuzzy co-processor.
//
// Plays the processor side of both FSL links at the top's default
// parameters: a slave-side FIFO model holds the words the processor has
// written (input 1 in bits 11:0, input 2 in bits 27:16) and a master-side
// sink takes results unless it asserts fsl_m_full. Every result word must
// equal the sign-extended reference weighted average of tb_ref_pkg, in
// order, with nothing lost or duplicated.
//
// Phases: (1) a single request from idle, whose result must appear 13 clocks
// after the word is read (12-clock core latency plus the result FIFO);
// (2) a long stream with the sink always ready, which must run at one word
// every 4 clocks; (3) a stream with the sink randomly full, which must make
// the credit scheme hold back input words. Each of these mechanisms is
// counted and a failure is recorded if one never happened.
module tb_flc_ip_top;
  import tb_ref_pkg::*;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [31:0] s_data, m_data;
  logic        s_exists, s_read, m_write, m_full, m_control;

  flc_ip_top dut (
    .clk, .rst,
    .fsl_s_data(s_data), .fsl_s_control(1'b0), .fsl_s_exists(s_exists), .fsl_s_read(s_read),
    .fsl_m_data(m_data), .fsl_m_control(m_control), .fsl_m_write(m_write), .fsl_m_full(m_full));

  // slave-side FIFO model (processor -> co-processor)
  logic [31:0] in_q [$];
  int          exp_q [$];
  assign s_exists = (in_q.size() > 0);
  assign s_data   = (in_q.size() > 0) ? in_q[0] : 32'h0;

  longint cyc = 0, last_read = -100, first_read = -1, first_write = -1;
  int     n_read = 0, n_write = 0;
  int     n_fullrate = 0, n_throttled = 0, n_fullwait = 0, n_neg = 0, n_pos = 0;
  bit     sink_rand = 0;
  bit     pop_pending = 0;

  always @(posedge clk) begin
    cyc++;
    if (!rst) begin
      if (s_read) begin
        if (first_read < 0) first_read = cyc;
        if (cyc - last_read == 4) n_fullrate++;
        last_read = cyc;
        n_read++;
        pop_pending = 1'b1;               // the FIFO model pops at the falling edge
      end else if (s_exists && dut.core_ready) begin
        n_throttled++;                     // core free but no credit left
      end
      if (m_full && dut.fifo_cnt != 0) n_fullwait++;
      if (m_write) begin
        int e;
        if (first_write < 0) first_write = cyc;
        e = (exp_q.size() > 0) ? exp_q.pop_front() : 99999;
        checks++;
        if (m_data !== 32'(e) || m_control !== 1'b0) begin
          failures++;
          if (failures < 10) $display("FAIL result %0d: %0d exp %0d", n_write, $signed(m_data), e);
        end
        if ($signed(m_data) < 0) n_neg++; else if ($signed(m_data) > 0) n_pos++;
        n_write++;
      end
    end
  end

  always @(negedge clk) begin
    m_full <= sink_rand ? ($urandom_range(0, 2) != 0) : 1'b0;
    if (pop_pending) void'(in_q.pop_front());
    pop_pending = 1'b0;
  end

  task automatic send(input int a, input int b);
    in_q.push_back({4'h0, 12'(b), 4'h0, 12'(a)});
    exp_q.push_back(ref_dflp(a, b));
  endtask

  initial begin
    m_full = 0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    // phase 1: single request, latency
    @(negedge clk);
    send(100, 3000);
    repeat (30) @(posedge clk);
    checks++;
    if (first_write - first_read != 13) begin
      failures++;
      $display("FAIL latency %0d", first_write - first_read);
    end
    // phase 2: full-rate stream
    @(negedge clk);
    for (int i = 0; i < 300; i++) send($urandom_range(0, 4095), $urandom_range(0, 4095));
    wait (in_q.size() == 0);
    repeat (30) @(posedge clk);
    // phase 3: random back-pressure from the sink
    @(negedge clk);
    sink_rand = 1;
    for (int i = 0; i < 300; i++) send($urandom_range(0, 4095), $urandom_range(0, 4095));
    wait (in_q.size() == 0);
    repeat (200) @(posedge clk);
    sink_rand = 0;
    repeat (30) @(posedge clk);
    checks++;
    if (n_write != 601 || exp_q.size() != 0) begin
      failures++;
      $display("FAIL wrote %0d of 601", n_write);
    end
    $display("mechanisms: full_rate=%0d throttled=%0d sink_full_waits=%0d neg=%0d pos=%0d",
             n_fullrate, n_throttled, n_fullwait, n_neg, n_pos);
    checks += 4;
    if (n_fullrate < 250) begin failures++; $display("FAIL full rate never reached"); end
    if (n_throttled == 0) begin failures++; $display("FAIL credit throttle never seen"); end
    if (n_fullwait == 0)  begin failures++; $display("FAIL sink full never seen"); end
    if (n_neg == 0 || n_pos == 0) begin failures++; $display("FAIL output sign coverage"); end
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
