// tb_iq_cal_top: end-to-end test of the calibrated transceiver baseband with
// every parameter of the top at its default.
//
// The top is wired to a behavioural loop-back model of the analog transceiver
// whose imbalances are the ones the paper reports as measured (G = 0.3055,
// phi = 44.7 deg, alpha = 1.0281, theta = -3.28 deg, beta = 1.0823,
// xi = 1.93 deg) plus DC offsets and +-1 LSB noise. The test:
//   1. sends a complex tone and measures the image rejection ratio (IRR) of
//      the whole TX -> RX loop with the identity gains after reset;
//   2. runs a calibration and checks its sequence (DC pre-read, four training
//      phases, LO switching, estimator, gain computation), its duration, and
//      the estimated parameters against the model's (gains within 0.003,
//      angles within 0.35 degree: the paths of about 160 ADC codes, rounded
//      to 12 bits and averaged over 64 samples, limit the phase accuracy);
//   3. measures the IRR again: it must rise above 45 dB and by at least 10 dB;
//   4. calibrates a second time with compensation active: the training levels
//      bypass the pre-compensator, so the estimate must not change.
// Each mechanism is counted and a mechanism that never happened is a failure.
module tb_iq_cal_top;
  import iq_cal_pkg::*;

  localparam real PI  = 3.14159265358979;
  localparam real DEG = PI / 180.0;
  // model truth
  localparam real T_G = 0.3055, T_PHI = 44.7003, T_ALPHA = 1.0281;
  localparam real T_THETA = -3.2828, T_BETA = 1.0823, T_XI = 1.9306;
  // top defaults, used to predict the calibration time
  localparam int SETTLE = 16, NAVG = 64;

  logic clk = 1'b0, rst_n = 1'b0;
  logic cal_start = 1'b0;
  logic tx_valid = 1'b0;
  sample_t tx_i = '0, tx_q = '0;
  logic dac_valid, adc_valid, rx_valid;
  sample_t dac_i, dac_q, adc_i, adc_q, rx_i, rx_q;
  logic lo_sw, loopback_en, cal_busy, cal_done;
  cal_state_t cal_state;
  path_t dc_i, dc_q;
  iq_params_t params;
  comp_coef_t coefs;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  iq_cal_top dut (
    .clk, .rst_n, .cal_start,
    .tx_valid, .tx_i, .tx_q, .dac_valid, .dac_i, .dac_q,
    .adc_valid, .adc_i, .adc_q, .rx_valid, .rx_i, .rx_q,
    .lo_sw, .loopback_en, .cal_busy, .cal_done, .cal_state, .dc_i, .dc_q, .params, .coefs);

  trx_loopback_model #(
    .G(T_G), .PHI(T_PHI), .ALPHA(T_ALPHA), .THETA(T_THETA), .BETA(T_BETA), .XI(T_XI)
  ) u_trx (
    .clk, .dac_valid, .dac_i, .dac_q, .lo_sw, .adc_valid, .adc_i, .adc_q);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  int n_lo_sw = 0, n_loopback = 0, n_dcoff = 0, n_est = 0, n_coef = 0, n_cal = 0;
  int n_train_i = 0, n_train_q = 0;
  always @(posedge clk) if (rst_n) begin
    if (lo_sw)       n_lo_sw++;
    if (loopback_en) n_loopback++;
    if (cal_state == CAL_DCOFF) n_dcoff++;
    if (dut.u_est.done)  n_est++;
    if (dut.u_coef.done) n_coef++;
    if (cal_done)    n_cal++;
    if (cal_busy && dac_i != 0) n_train_i++;
    if (cal_busy && dac_q != 0) n_train_q++;
  end

  // send a complex tone A*exp(j*2*pi*K*n/N) and measure the image rejection
  task automatic measure_irr(output real irr_db, output real gain);
    localparam int  N = 64, K = 5, LEN = 64 * 12;
    localparam real A = 1500.0;
    real dr, di, mr, mi, w;
    int t, got;
    dr = 0; di = 0; mr = 0; mi = 0; got = 0;
    w = 2.0 * PI * K / N;
    t = 0;
    while (got < LEN) begin
      @(negedge clk);
      tx_valid = 1'b1;
      tx_i = sample_t'($rtoi($floor(A * $cos(w * t) + 0.5)));
      tx_q = sample_t'($rtoi($floor(A * $sin(w * t) + 0.5)));
      // rx_valid at this point belongs to the previous rising edge
      if (t > 32 && rx_valid) begin
        real yi, yq, c, s;
        yi = real'(rx_i);
        yq = real'(rx_q);
        c = $cos(w * t);
        s = $sin(w * t);
        // desired: y * exp(-jwt), image: y * exp(+jwt)
        dr += yi * c + yq * s;
        di += yq * c - yi * s;
        mr += yi * c - yq * s;
        mi += yq * c + yi * s;
        got++;
      end
      t++;
    end
    @(negedge clk);
    tx_valid = 1'b0;
    irr_db = 10.0 * $log10((dr * dr + di * di) / (mr * mr + mi * mi + 1e-9));
    gain = $sqrt(dr * dr + di * di) / (real'(LEN) * A);
  endtask

  task automatic near(input string what, input real got, input real exp_v, input real tol);
    checks++;
    if (got - exp_v > tol || exp_v - got > tol) begin
      failures++;
      $display("%s: got %f expected %f", what, got, exp_v);
    end
  endtask

  task automatic calibrate(output int cycles);
    @(negedge clk);
    cal_start = 1'b1;
    @(negedge clk);
    cal_start = 1'b0;
    cycles = 1;
    while (!cal_done && cycles < 100000) begin
      @(negedge clk);
      cycles++;
    end
  endtask

  initial begin
    real irr0, irr1, g0, g1;
    int cyc;
    iq_params_t p1;
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    repeat (4) @(posedge clk);
    checks++;
    if (coefs != COEF_IDENTITY) begin
      failures++;
      $display("gains after reset are not the identity");
    end

    measure_irr(irr0, g0);
    $display("IRR before calibration: %0.1f dB", irr0);

    calibrate(cyc);
    $display("calibration took %0d cycles", cyc);
    // five phases of SETTLE + NAVG samples, 85 + 11 cycles of computation,
    // and a few cycles of handshaking between them
    checks++;
    if (cyc < 5 * (SETTLE + NAVG) + 96 || cyc > 5 * (SETTLE + NAVG) + 110) begin
      failures++;
      $display("calibration time %0d outside the expected window", cyc);
    end
    $display("G %f phi %f alpha %f theta %f beta %f xi %f",
             real'(params.g) / 16384.0, real'(params.phi) / 8192.0 / DEG,
             real'(params.alpha) / 16384.0, real'(params.theta) / 8192.0 / DEG,
             real'(params.beta) / 16384.0, real'(params.xi) / 8192.0 / DEG);
    near("G",     real'(params.g)     / 16384.0,     T_G,     0.003);
    near("phi",   real'(params.phi)   / 8192.0 / DEG, T_PHI,   0.35);
    near("alpha", real'(params.alpha) / 16384.0,     T_ALPHA, 0.003);
    near("theta", real'(params.theta) / 8192.0 / DEG, T_THETA, 0.35);
    near("beta",  real'(params.beta)  / 16384.0,     T_BETA,  0.003);
    near("xi",    real'(params.xi)    / 8192.0 / DEG, T_XI,    0.35);
    p1 = params;
    near("DC offset I", real'(dc_i) / 16.0, 9.0, 0.5);
    near("DC offset Q", real'(dc_q) / 16.0, -6.0, 0.5);

    measure_irr(irr1, g1);
    $display("IRR after calibration: %0.1f dB (loop gain %f)", irr1, g1);
    checks++;
    if (irr1 < 45.0 || irr1 - irr0 < 10.0) begin
      failures++;
      $display("IRR not improved enough: %0.1f -> %0.1f dB", irr0, irr1);
    end
    // a calibrated loop is an ideal rotation scaled by G
    near("loop gain", g1, T_G, 0.01);

    // second calibration with compensation active
    calibrate(cyc);
    near("G again",     real'(params.g)     / 16384.0, real'(p1.g)     / 16384.0, 0.006);
    near("alpha again", real'(params.alpha) / 16384.0, real'(p1.alpha) / 16384.0, 0.006);
    near("beta again",  real'(params.beta)  / 16384.0, real'(p1.beta)  / 16384.0, 0.006);
    near("theta again", real'(params.theta) / 8192.0 / DEG, real'(p1.theta) / 8192.0 / DEG, 0.3);
    near("xi again",    real'(params.xi)    / 8192.0 / DEG, real'(p1.xi)    / 8192.0 / DEG, 0.3);

    repeat (4) @(posedge clk);
    // every mechanism must have happened
    $display("LO switched %0d cycles, loop-back %0d, DC pre-read %0d, I/Q training %0d/%0d, estimates %0d, gain sets %0d, calibrations %0d",
             n_lo_sw, n_loopback, n_dcoff, n_train_i, n_train_q, n_est, n_coef, n_cal);
    checks++;
    if (n_lo_sw == 0 || n_loopback == 0 || n_dcoff == 0 || n_train_i == 0 || n_train_q == 0 ||
        n_est != 2 || n_coef != 2 || n_cal != 2) begin
      failures++;
      $display("a mechanism did not happen as expected");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
