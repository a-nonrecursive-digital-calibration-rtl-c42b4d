// lo_irr_bench: one calibrated transceiver for tb_lo_irr_sweep. It wires the
// top (default parameters) to the loop-back model at the paper's measured
// imbalances, with a given LO quadrature error and ADC rate, then calibrates
// once and measures the image rejection of the calibrated loop.
// Results are read hierarchically: finished, irr_db, cal_cycles, params.
module lo_irr_bench
  import iq_cal_pkg::*;
#(
  parameter real LO_PHASE = 0.0,   // LO quadrature error, degrees
  parameter int  ADC_SKIP = 0      // see trx_loopback_model
) (
  input logic clk,
  input logic rst_n
);

  localparam real PI = 3.14159265358979;

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

  bit  finished = 1'b0;
  real irr_db = 0.0;
  int  cal_cycles = 0;

  iq_cal_top dut (
    .clk, .rst_n, .cal_start,
    .tx_valid, .tx_i, .tx_q, .dac_valid, .dac_i, .dac_q,
    .adc_valid, .adc_i, .adc_q, .rx_valid, .rx_i, .rx_q,
    .lo_sw, .loopback_en, .cal_busy, .cal_done, .cal_state, .dc_i, .dc_q, .params, .coefs);

  trx_loopback_model #(
    .G(0.3055), .PHI(44.7003), .ALPHA(1.0281), .THETA(-3.2828), .BETA(1.0823), .XI(1.9306),
    .LO_PHASE(LO_PHASE), .ADC_SKIP(ADC_SKIP)
  ) u_trx (
    .clk, .dac_valid, .dac_i, .dac_q, .lo_sw, .adc_valid, .adc_i, .adc_q);

  // complex tone A*exp(j*2*pi*K*n/N); image rejection from the two correlations
  task automatic measure_irr(output real irr);
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
      if (t > 32 && rx_valid) begin
        real yi, yq, c, s;
        yi = real'(rx_i);
        yq = real'(rx_q);
        c = $cos(w * t);
        s = $sin(w * t);
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
    irr = 10.0 * $log10((dr * dr + di * di) / (mr * mr + mi * mi + 1e-9));
  endtask

  initial begin
    @(posedge rst_n);
    repeat (4) @(negedge clk);
    cal_start = 1'b1;
    @(negedge clk);
    cal_start = 1'b0;
    cal_cycles = 1;
    while (!cal_done && cal_cycles < 100000) begin
      @(negedge clk);
      cal_cycles++;
    end
    measure_irr(irr_db);
    finished = 1'b1;
  end

endmodule
