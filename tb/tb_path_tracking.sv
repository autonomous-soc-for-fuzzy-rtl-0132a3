// tb_path_tracking: closed-loop path tracking through the fuzzy co-processor.
//
// The processor side of the tracker is modelled here in real arithmetic: a
// robot that moves like a unicycle at v' = 1000 mm/s, a path sampled every
// 0.1 m, the closest-point search, a spatial window (order 3, step 2,
// offset 2) and the mean of the window's curvatures. For every window
// point the two controller inputs are computed,
//   phi_1 = bearing of the point relative to the heading,
//   phi_2 = direction of the path tangent relative to the heading,
// mapped from [-pi, pi) to codes 0..4095, and sent through the FSL links of
// flc_ip_top. Every result is checked against the reference model. The
// curvature command is (y / 2048) * kappa_max with kappa_max = 1 rad/m, and
// the angular-velocity command is quantised to whole deg/s as the robot's
// command format requires, omega' = round(kappa * v' * 180 / (1000 pi)).
//
// Two runs: a 25 m straight path started 1 m off the path, and an S-shaped
// path y = 2 sin(2 pi x / 20), 0 <= x <= 23 m, about 25 m long. Each run must
// reach the end of the path, and after the first 8 m the distance to the
// path must stay below 0.1 m (straight) and 0.2 m (S-shaped). The tables in the core are the placeholder defaults, so this shows
// the loop and the data path working, not the tuned tracker's accuracy.
module tb_path_tracking;
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

  localparam real PI   = 3.14159265358979;
  localparam real DS   = 0.1;     // path sampling, m
  localparam real DT   = 0.1;     // control period, s
  localparam real V    = 1.0;     // speed, m/s
  localparam real KMAX = 1.0;     // maximum curvature, rad/m
  localparam int  W_ORDER = 3, W_STEP = 2, W_OFFSET = 2;

  real px [$];
  real py [$];
  int  calls = 0, quant_levels_used = 0;

  assign m_full = 1'b0;

  function automatic real wrap(input real a);
    real r = a;
    while (r >= PI) r -= 2.0 * PI;
    while (r < -PI) r += 2.0 * PI;
    return r;
  endfunction

  function automatic int to_code(input real a);
    int c = int'($floor(wrap(a) / PI * 2048.0)) + 2048;
    if (c < 0) c = 0;
    if (c > 4095) c = 4095;
    return c;
  endfunction

  // one co-processor call over FSL
  task automatic fuzzy_call(input int a, input int b, output int y);
    @(negedge clk);
    s_data   = {4'h0, 12'(b), 4'h0, 12'(a)};
    s_exists = 1'b1;
    do @(posedge clk); while (!s_read);
    #1 s_exists = 1'b0;
    do @(posedge clk); while (!m_write);
    y = int'($signed(m_data));
    checks++;
    calls++;
    if (y != ref_dflp(a, b)) begin
      failures++;
      if (failures < 10) $display("FAIL call %0d: y=%0d exp %0d", calls, y, ref_dflp(a, b));
    end
  endtask

  task automatic run_path(input string name, input real x0, input real y0, input real th0,
                          input real tol);
    real x = x0, y = y0, th = th0, dist_done = 0.0, max_err = 0.0;
    int  n = px.size();
    int  j = 0;
    int  steps = 0;
    while (j < n - 1 - W_OFFSET - W_STEP * (W_ORDER - 1) && steps < 600) begin
      real best = 1.0e9;
      real ksum = 0.0, kappa, omega_q, d;
      // closest path point by squared distance
      for (int i = 0; i < n; i++) begin
        real e = (px[i] - x) ** 2 + (py[i] - y) ** 2;
        if (e < best) begin best = e; j = i; end
      end
      d = $sqrt(best);
      if (dist_done > 8.0 && d > max_err) max_err = d;
      // spatial window
      for (int w = 0; w < W_ORDER; w++) begin
        int  p = j + W_OFFSET + w * W_STEP;
        int  q;
        real phi1, phi2;
        int  yk;
        if (p > n - 2) p = n - 2;
        q = p + 1;
        phi1 = $atan2(py[p] - y, px[p] - x) - th;
        phi2 = $atan2(py[q] - py[p], px[q] - px[p]) - th;
        fuzzy_call(to_code(phi1), to_code(phi2), yk);
        ksum += real'(yk);
      end
      kappa   = ksum / W_ORDER / 2048.0 * KMAX;
      omega_q = $floor(kappa * V * 1000.0 * 180.0 / (1000.0 * PI) + 0.5);   // deg/s
      if (omega_q != 0.0) quant_levels_used++;
      th += omega_q * PI / 180.0 * DT;
      x  += V * DT * $cos(th);
      y  += V * DT * $sin(th);
      dist_done += V * DT;
      steps++;
    end
    $display("%s: %0d control steps, %0d fuzzy calls so far, max distance after 8 m = %.3f m",
             name, steps, calls, max_err);
    checks += 2;
    if (steps >= 600) begin failures++; $display("FAIL %s: end of path not reached", name); end
    if (max_err > tol) begin failures++; $display("FAIL %s: tracking error %.3f m", name, max_err); end
  endtask

  initial begin
    s_exists = 0; s_data = '0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    // straight path, 25 m along x
    for (int i = 0; i <= 250; i++) begin px.push_back(i * DS); py.push_back(0.0); end
    run_path("straight", 0.0, 1.0, 0.0, 0.1);
    // S-shaped path, resampled to DS along its length
    px.delete(); py.delete();
    begin
      real xs = 0.0, ys = 0.0, acc = 0.0;
      px.push_back(0.0); py.push_back(0.0);
      while (xs < 23.0) begin
        real xn, yn;
        xn = xs + 0.001;
        yn = 2.0 * $sin(2.0 * PI * xn / 20.0);
        acc += $sqrt((xn - xs) ** 2 + (yn - ys) ** 2);
        xs = xn; ys = yn;
        if (acc >= DS) begin px.push_back(xs); py.push_back(ys); acc = 0.0; end
      end
    end
    $display("S path: %0d points, %.1f m", px.size(), (px.size() - 1) * DS);
    run_path("S-shaped", 0.0, -0.5, 0.3, 0.2);
    checks++;
    if (quant_levels_used == 0) begin failures++; $display("FAIL no steering command issued"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
