// tb_cal_controller: self-checking test of the data-picking sequence.
// A linear stand-in for the analog loop-back turns the training codes and the
// LO-switch state into ADC codes (different gains per phase, a DC offset and
// small noise). The test checks the order of phases and switch settings of the
// calibration time diagram, that only one training input is active at a time,
// the number of samples each phase takes, the learnt DC offsets and the six
// averaged path values, and the est_start/coef_start/cal_done handshake. It
// runs with reduced settle and averaging lengths, and once with sparse
// adc_valid.
module tb_cal_controller;
  import iq_cal_pkg::*;

  localparam int SETTLE   = 4;
  localparam int AVG_LOG2 = 4;
  localparam int PHASE    = SETTLE + (1 << AVG_LOG2);

  logic clk = 1'b0, rst_n = 1'b0;
  logic cal_start = 1'b0, adc_valid = 1'b0;
  sample_t adc_i = '0, adc_q = '0;
  logic est_done = 1'b0, coef_done = 1'b0;
  cal_state_t state;
  logic cal_busy, cal_done, loopback_en, lo_sw, est_start, coef_start;
  sample_t tx_i_train, tx_q_train;
  path_t dc_i, dc_q;
  path_set_t paths;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  cal_controller #(.C_LOG2(9), .SETTLE(SETTLE), .AVG_LOG2(AVG_LOG2)) dut (
    .clk, .rst_n, .cal_start, .adc_valid, .adc_i, .adc_q, .est_done, .coef_done,
    .state, .cal_busy, .cal_done, .loopback_en, .lo_sw, .tx_i_train, .tx_q_train,
    .est_start, .coef_start, .dc_i, .dc_q, .paths);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // loop-back stand-in: I_rx/Q_rx gains for (I_tx, Q_tx) in each LO state
  localparam real KII0 = 0.25, KIQ0 = -0.05, KQI0 = 0.20, KQQ0 = 0.11;
  localparam real KII1 = -0.18, KIQ1 = 0.23, KQI1 = 0.22, KQQ1 = -0.07;
  localparam real DCI = 13.0, DCQ = -21.0;
  int valid_pct = 100;

  always @(negedge clk) begin
    real ri, rq, ti, tq;
    ti = real'(tx_i_train);
    tq = real'(tx_q_train);
    if (lo_sw) begin
      ri = KII1 * ti + KIQ1 * tq;
      rq = KQI1 * ti + KQQ1 * tq;
    end else begin
      ri = KII0 * ti + KIQ0 * tq;
      rq = KQI0 * ti + KQQ0 * tq;
    end
    // +-1 LSB noise with zero mean
    adc_i = sample_t'($rtoi($floor(ri + DCI + 0.5)) + ($signed($urandom_range(0, 2)) - 1));
    adc_q = sample_t'($rtoi($floor(rq + DCQ + 0.5)) + ($signed($urandom_range(0, 2)) - 1));
    adc_valid = ($urandom_range(1, 100) <= valid_pct);
  end

  // sample counter per phase and switch/training checks
  int samples[cal_state_t];
  always @(posedge clk) begin
    if (rst_n && adc_valid) samples[state] = samples[state] + 1;
    if (rst_n) begin
      logic exp_lo;
      sample_t exp_i, exp_q;
      exp_lo = (state == CAL_P45 || state == CAL_P6);
      exp_i  = (state == CAL_P12 || state == CAL_P45) ? sample_t'(512) : '0;
      exp_q  = (state == CAL_P3  || state == CAL_P6)  ? sample_t'(512) : '0;
      checks++;
      if (lo_sw != exp_lo || tx_i_train != exp_i || tx_q_train != exp_q) begin
        failures++;
        $display("switch/training wrong in state %s", state.name());
      end
    end
  end

  // stand-ins for the estimator and coefficient unit
  int n_est = 0, n_coef = 0, n_done = 0;
  always @(posedge clk) begin
    est_done  <= 1'b0;
    coef_done <= 1'b0;
    if (est_start) begin
      n_est++;
      est_done <= 1'b0;
      fork begin repeat (20) @(posedge clk); est_done <= 1'b1; @(posedge clk); est_done <= 1'b0; end join_none
    end
    if (coef_start) begin
      n_coef++;
      fork begin repeat (5) @(posedge clk); coef_done <= 1'b1; @(posedge clk); coef_done <= 1'b0; end join_none
    end
    if (cal_done) n_done++;
  end

  task automatic near(input string what, input path_t got, input real exp_v);
    real g;
    g = real'(got) / 16.0;
    checks++;
    if (g - exp_v > 1.2 || exp_v - g > 1.2) begin
      failures++;
      $display("%s: got %f expected %f", what, g, exp_v);
    end
  endtask

  task automatic calibrate();
    cal_state_t order[$];
    cal_state_t last;
    samples.delete();
    n_est = 0; n_coef = 0; n_done = 0;
    @(negedge clk);
    cal_start = 1'b1;
    @(negedge clk);
    cal_start = 1'b0;
    last = state;
    order.push_back(state);
    while (state != CAL_IDLE) begin
      @(negedge clk);
      if (state != last) begin
        order.push_back(state);
        last = state;
      end
    end
    checks++;
    if (order.size() != 9 || order[0] != CAL_DCOFF || order[1] != CAL_P12 || order[2] != CAL_P3 ||
        order[3] != CAL_P45 || order[4] != CAL_P6 || order[5] != CAL_EST || order[6] != CAL_COEF ||
        order[7] != CAL_DONE || order[8] != CAL_IDLE) begin
      failures++;
      $display("phase order wrong (%0d phases)", order.size());
    end
    foreach (order[j]) if (j < 5) begin
      checks++;
      if (samples[order[j]] != PHASE) begin
        failures++;
        $display("phase %s took %0d samples, expected %0d", order[j].name(), samples[order[j]], PHASE);
      end
    end
    checks++;
    if (n_est != 1 || n_coef != 1 || n_done != 1) begin
      failures++;
      $display("handshake counts est %0d coef %0d done %0d", n_est, n_coef, n_done);
    end
    near("dc_i", dc_i, DCI);
    near("dc_q", dc_q, DCQ);
    near("path1", paths.i1, KII0 * 512.0);
    near("path2", paths.q2, KQI0 * 512.0);
    near("path3", paths.i3, KIQ0 * 512.0);
    near("path4", paths.i4, KII1 * 512.0);
    near("path5", paths.q5, KQI1 * 512.0);
    near("path6", paths.i6, KIQ1 * 512.0);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (3) @(posedge clk);
    checks++;
    if (cal_busy || loopback_en) begin
      failures++;
      $display("busy after reset");
    end
    calibrate();
    valid_pct = 40;
    calibrate();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
