// iq_cal_top: digital baseband of a quadrature transceiver with joint TX/RX
// I/Q-imbalance calibration by LO switching.
//
// Normal operation: the TX baseband (tx_i, tx_q) passes through the
// pre-compensator to the DAC outputs, and the ADC samples pass through the
// post-compensator to (rx_i, rx_q). Calibration (cal_start): the controller
// closes the TX-RX loop-back, sends DC training levels to the DACs in place of
// the TX data, switches the LO by 90 degrees for the second half, and picks
// six averaged, offset-free path values. The estimator solves G, phi, alpha,
// theta, beta and xi from them with one CORDIC; the coefficient unit derives
// the four compensator gains, which the compensators use from then on.
//
// Interface: one clock for everything; samples move when their valid is high.
// lo_sw and loopback_en drive the transceiver's LO switches and TX-RX switch.
// params and coefs show the latest estimate and gains (identity gains after
// reset); dc_i/dc_q the offsets of the last pre-read (Q12.4).
//
// Timing: the pre-compensator and the DAC register add two cycles from tx to
// dac; the post-compensator adds one from adc to rx. A
// calibration takes 5 * (SETTLE + 2^AVG_LOG2) ADC samples plus 85 cycles of
// estimation and 11 of gain computation.
//
// The block structure follows the paper's system diagram; replacing the TX
// data with the training levels during calibration is this design's choice.
module iq_cal_top
  import iq_cal_pkg::*;
#(
  parameter int unsigned C_LOG2   = 9,
  parameter int unsigned SETTLE   = 16,
  parameter int unsigned AVG_LOG2 = 6
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       cal_start,
  // TX baseband in, DAC codes out
  input  logic       tx_valid,
  input  sample_t    tx_i,
  input  sample_t    tx_q,
  output logic       dac_valid,
  output sample_t    dac_i,
  output sample_t    dac_q,
  // ADC codes in, RX baseband out
  input  logic       adc_valid,
  input  sample_t    adc_i,
  input  sample_t    adc_q,
  output logic       rx_valid,
  output sample_t    rx_i,
  output sample_t    rx_q,
  // transceiver switch controls
  output logic       lo_sw,
  output logic       loopback_en,
  // status
  output logic       cal_busy,
  output logic       cal_done,
  output cal_state_t cal_state,
  output path_t      dc_i,        // DC offsets learnt in the pre-read phase
  output path_t      dc_q,
  output iq_params_t params,
  output comp_coef_t coefs
);

  logic      est_start, est_busy, est_done;
  logic      coef_start, coef_busy, coef_done;
  sample_t   tx_i_train, tx_q_train;
  path_set_t paths;

  logic      pre_valid;
  sample_t   pre_i, pre_q;

  cal_controller #(.C_LOG2(C_LOG2), .SETTLE(SETTLE), .AVG_LOG2(AVG_LOG2)) u_ctrl (
    .clk, .rst_n,
    .cal_start,
    .adc_valid, .adc_i, .adc_q,
    .est_done, .coef_done,
    .state      (cal_state),
    .cal_busy, .cal_done, .loopback_en, .lo_sw,
    .tx_i_train, .tx_q_train,
    .est_start, .coef_start,
    .dc_i, .dc_q,
    .paths
  );

  param_estimator #(.C_LOG2(C_LOG2)) u_est (
    .clk, .rst_n,
    .start  (est_start),
    .paths,
    .busy   (est_busy),
    .done   (est_done),
    .params
  );

  comp_coef_unit u_coef (
    .clk, .rst_n,
    .start  (coef_start),
    .params,
    .busy   (coef_busy),
    .done   (coef_done),
    .coefs
  );

  pre_compensator u_pre (
    .clk, .rst_n,
    .in_valid  (tx_valid),
    .i_in      (tx_i),
    .q_in      (tx_q),
    .neg_tan   (coefs.tx_neg_tan),
    .k         (coefs.tx_k),
    .out_valid (pre_valid),
    .i_out     (pre_i),
    .q_out     (pre_q)
  );

  post_compensator u_post (
    .clk, .rst_n,
    .in_valid  (adc_valid),
    .i_in      (adc_i),
    .q_in      (adc_q),
    .neg_tan   (coefs.rx_neg_tan),
    .k         (coefs.rx_k),
    .out_valid (rx_valid),
    .i_out     (rx_i),
    .q_out     (rx_q)
  );

  // DAC register: training levels while calibrating, compensated TX otherwise
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dac_valid <= 1'b0;
      dac_i     <= '0;
      dac_q     <= '0;
    end else if (cal_busy) begin
      dac_valid <= 1'b1;
      dac_i     <= tx_i_train;
      dac_q     <= tx_q_train;
    end else begin
      dac_valid <= pre_valid;
      dac_i     <= pre_i;
      dac_q     <= pre_q;
    end
  end

  // the estimator and the coefficient unit never run at the same time
  assert property (@(posedge clk) disable iff (!rst_n) !(est_busy && coef_busy));

endmodule
