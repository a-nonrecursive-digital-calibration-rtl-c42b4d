// tb_param_estimator: self-checking test of the parameter estimator.
// For known loop-back parameters (G, phi, alpha, theta, beta, xi) the six
// path values are built from the LPF outputs of paths 1..6 (c = 512 codes,
// Q12.4), the estimator is run, and every estimate is compared with the truth:
// gains within 0.002, angles within 0.1 degree. The first set is the one the
// paper reports as measured; the rest are random. Also checks the latency
// of 85 cycles (three 25-cycle CORDIC passes, the last division, one register).
module tb_param_estimator;
  import iq_cal_pkg::*;

  localparam real PI  = 3.14159265358979;
  localparam real DEG = PI / 180.0;
  localparam real C   = 512.0;

  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0;
  path_set_t paths = '0;
  logic busy, done;
  iq_params_t params;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  param_estimator dut (.clk, .rst_n, .start, .paths, .busy, .done, .params);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic path_t q4(input real v);
    return path_t'($rtoi($floor(v * 16.0 + 0.5)));
  endfunction

  task automatic expect_near(input string what, input real got, input real exp_v, input real tol);
    checks++;
    if (got - exp_v > tol || exp_v - got > tol) begin
      failures++;
      $display("%s: got %f expected %f", what, got, exp_v);
    end
  endtask

  task automatic run(input real g, input real ph, input real al, input real th,
                     input real be, input real xi);
    int n;
    real cg;
    cg = C * g;
    @(negedge clk);
    paths.i1 = q4(cg * $cos(ph));
    paths.q2 = q4(cg * be * $sin(ph + xi));
    paths.i3 = q4(cg * al * $sin(th - ph));
    paths.i4 = q4(-cg * $sin(ph));
    paths.q5 = q4(cg * be * $cos(ph + xi));
    paths.i6 = q4(cg * al * $cos(th - ph));
    start = 1'b1;
    @(posedge clk); #1;
    start = 1'b0;
    n = 1;
    while (!done) begin
      @(posedge clk); #1;
      n++;
    end
    checks++;
    if (n != 85) begin
      failures++;
      $display("latency %0d, expected 85", n);
    end
    expect_near("G",     real'(params.g)     / 16384.0, g,  0.002);
    expect_near("alpha", real'(params.alpha) / 16384.0, al, 0.002);
    expect_near("beta",  real'(params.beta)  / 16384.0, be, 0.002);
    expect_near("phi",   real'(params.phi)   / 8192.0,  ph, 0.1 * DEG);
    expect_near("theta", real'(params.theta) / 8192.0,  th, 0.1 * DEG);
    expect_near("xi",    real'(params.xi)    / 8192.0,  xi, 0.1 * DEG);
  endtask

  function automatic real urand(input real lo, input real hi);
    return lo + (hi - lo) * real'($urandom_range(0, 1000000)) / 1000000.0;
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run(0.3055, 44.7003 * DEG, 1.0281, -3.2828 * DEG, 1.0823, 1.9306 * DEG);
    run(0.5, -120.0 * DEG, 0.95, 5.0 * DEG, 0.9, -6.0 * DEG);
    run(0.2, 170.0 * DEG, 1.1, -8.0 * DEG, 1.05, 8.0 * DEG);
    run(0.4, -175.0 * DEG, 1.0, 8.0 * DEG, 1.0, -8.0 * DEG);   // theta - phi beyond 180 deg
    run(0.4, 178.0 * DEG, 1.0, -9.0 * DEG, 1.0, 9.0 * DEG);    // phi + xi beyond 180 deg
    for (int t = 0; t < 60; t++)
      run(urand(0.2, 1.5), urand(-179.0, 179.0) * DEG, urand(0.8, 1.2), urand(-10.0, 10.0) * DEG,
          urand(0.8, 1.2), urand(-10.0, 10.0) * DEG);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
