// tb_estimation_accuracy: numerical accuracy of the parameter estimation over
// 100000 random runs.
//
// Each run draws loop-back parameters around the measured ones (G 0.25..0.4,
// phi anywhere, alpha and beta 0.9..1.1, theta and xi within +-6 degrees),
// builds the six path values exactly as the calibration averages would give
// them without noise (c = 512 codes, rounded to Q12.4), runs the parameter
// estimator and then the gain unit, and records the worst error of the gain
// estimates (alpha, beta) and of the phase estimates (theta, xi). It fails if
// a gain error exceeds 1e-3 or a phase error exceeds 0.1 degree, or if the
// compensator gains differ by more than 4 LSB of Q2.14 from the exact ones
// for the estimated parameters.
module tb_estimation_accuracy;
  import iq_cal_pkg::*;

  localparam real PI  = 3.14159265358979;
  localparam real DEG = PI / 180.0;
  localparam real C   = 512.0;
  localparam int  RUNS = 100000;

  logic clk = 1'b0, rst_n = 1'b0;
  logic est_start = 1'b0, est_busy, est_done;
  logic coef_busy, coef_done;
  path_set_t paths = '0;
  iq_params_t params;
  comp_coef_t coefs;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  param_estimator u_est (.clk, .rst_n, .start(est_start), .paths, .busy(est_busy),
                         .done(est_done), .params);
  comp_coef_unit u_coef (.clk, .rst_n, .start(est_done), .params, .busy(coef_busy),
                         .done(coef_done), .coefs);

  initial begin
    repeat (RUNS * 110 + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic path_t q4(input real v);
    return path_t'($rtoi($floor(v * 16.0 + 0.5)));
  endfunction
  function automatic real urand(input real lo, input real hi);
    return lo + (hi - lo) * real'($urandom_range(0, 1000000)) / 1000000.0;
  endfunction
  function automatic real absr(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  initial begin
    real g, ph, al, th, be, xi, cg, eg, ep, ek, max_g, max_p, max_k;
    real the, xie, ale, bee;
    max_g = 0; max_p = 0; max_k = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < RUNS; r++) begin
      g  = urand(0.25, 0.4);
      ph = urand(-180.0, 180.0) * DEG;
      al = urand(0.9, 1.1);
      th = urand(-6.0, 6.0) * DEG;
      be = urand(0.9, 1.1);
      xi = urand(-6.0, 6.0) * DEG;
      cg = C * g;
      @(negedge clk);
      paths.i1 = q4(cg * $cos(ph));
      paths.q2 = q4(cg * be * $sin(ph + xi));
      paths.i3 = q4(cg * al * $sin(th - ph));
      paths.i4 = q4(-cg * $sin(ph));
      paths.q5 = q4(cg * be * $cos(ph + xi));
      paths.i6 = q4(cg * al * $cos(th - ph));
      est_start = 1'b1;
      @(negedge clk);
      est_start = 1'b0;
      while (!coef_done) @(negedge clk);
      eg = absr(real'(params.alpha) / 16384.0 - al);
      if (absr(real'(params.beta) / 16384.0 - be) > eg) eg = absr(real'(params.beta) / 16384.0 - be);
      ep = absr(real'(params.theta) / 8192.0 - th);
      if (absr(real'(params.xi) / 8192.0 - xi) > ep) ep = absr(real'(params.xi) / 8192.0 - xi);
      // the gain unit is judged against the estimate it was given
      the = real'(params.theta) / 8192.0;
      xie = real'(params.xi) / 8192.0;
      ale = real'(params.alpha) / 16384.0;
      bee = real'(params.beta) / 16384.0;
      ek = absr(real'(coefs.tx_k) / 16384.0 - 1.0 / ($cos(the) * ale));
      if (absr(real'(coefs.rx_k) / 16384.0 - 1.0 / ($cos(xie) * bee)) > ek)
        ek = absr(real'(coefs.rx_k) / 16384.0 - 1.0 / ($cos(xie) * bee));
      if (absr(real'(coefs.tx_neg_tan) / 16384.0 + $tan(the)) > ek)
        ek = absr(real'(coefs.tx_neg_tan) / 16384.0 + $tan(the));
      if (absr(real'(coefs.rx_neg_tan) / 16384.0 + $tan(xie)) > ek)
        ek = absr(real'(coefs.rx_neg_tan) / 16384.0 + $tan(xie));
      if (eg > max_g) max_g = eg;
      if (ep > max_p) max_p = ep;
      if (ek > max_k) max_k = ek;
      checks++;
      if (eg > 1e-3 || ep > 0.1 * DEG || ek > 4.0 / 16384.0) begin
        failures++;
        if (failures < 10) $display("run %0d: gain error %g, phase error %g deg, gain-unit error %g", r, eg, ep / DEG, ek);
      end
    end
    $display("%0d runs: max gain error %g, max phase error %g deg, max compensator gain error %g",
             RUNS, max_g, max_p / DEG, max_k);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
