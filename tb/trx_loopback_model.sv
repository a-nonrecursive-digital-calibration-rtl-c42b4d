// trx_loopback_model: behavioural model (not synthesizable) of the analog
// transceiver in calibration loop-back, seen from the converters: DACs, TX
// LPFs and mixers, TX-RX switch and source follower, RX mixers and LPFs, ADCs.
//
// It works at baseband with the low-pass-filtered mixer products of the
// imbalance model. With the LO direct the TX carriers are cos(wt) for I and
// alpha*sin(wt+theta) for Q; with lo_sw set the LO is shifted by 90 degrees
// and they become sin(wt) and alpha*cos(wt+theta). The RX mixes with
// B*cos(wt+phi) for I and beta*B*sin(wt+phi+xi) for Q. With G = A*B/2 and an
// ideal LO:
//   LO direct:   I_rx = G (I cos(phi)  + alpha Q sin(theta-phi))
//                Q_rx = G beta (I sin(phi+xi) + alpha Q cos(theta-phi-xi))
//   LO switched: I_rx = G (-I sin(phi) + alpha Q cos(theta-phi))
//                Q_rx = G beta (I cos(phi+xi) + alpha Q sin(phi+xi-theta))
// A non-ideal LO has a Q phase gamma*sin(wt+eta) (LO_GAIN, LO_PHASE). With
// the LO direct this is part of the TX's own alpha and theta; with the LO
// switched the I carrier becomes gamma*sin(wt+eta) and the Q carrier
// (alpha/gamma)*cos(wt+theta-eta), which biases the estimate.
// ADC_SKIP > 0 drops every ADC_SKIP-th sample (ADC_SKIP = 5 gives 80 MHz
// converters against a 100-MHz logic clock).
// A DC offset is added, the result is rounded to 12-bit codes (with optional
// uniform +-1 LSB noise before rounding) and delivered LATENCY cycles later. The loop is modelled
// whether or not loopback_en is set, so the same path also stands for an
// over-the-air link in normal operation. One sample per clock.
module trx_loopback_model
  import iq_cal_pkg::*;
#(
  parameter real G     = 0.3055,
  parameter real PHI   = 44.7003,   // degrees
  parameter real ALPHA = 1.0281,
  parameter real THETA = -3.2828,   // degrees
  parameter real BETA  = 1.0823,
  parameter real XI    = 1.9306,    // degrees
  parameter real DC_I  = 9.0,
  parameter real DC_Q  = -6.0,
  parameter real LO_GAIN  = 1.0,     // gamma: gain of the LO's Q phase
  parameter real LO_PHASE = 0.0,     // eta: quadrature error of the LO, degrees
  parameter int  LATENCY = 4,
  parameter int  ADC_SKIP = 0,       // every ADC_SKIP-th clock has no ADC sample (0: none)
  parameter bit  NOISE = 1'b1
) (
  input  logic    clk,
  input  logic    dac_valid,
  input  sample_t dac_i,
  input  sample_t dac_q,
  input  logic    lo_sw,
  output logic    adc_valid,
  output sample_t adc_i,
  output sample_t adc_q
);

  localparam real DEG = 3.14159265358979 / 180.0;

  sample_t pipe_i[LATENCY];
  sample_t pipe_q[LATENCY];
  logic    pipe_v[LATENCY];

  function automatic sample_t to_code(input real v);
    int c;
    real u;
    // uniform noise of +-1 LSB before rounding (it also dithers the rounding)
    u = NOISE ? (real'($urandom_range(0, 2000)) / 1000.0 - 1.0) : 0.0;
    c = $rtoi($floor(v + u + 0.5));
    if (c > 2047) c = 2047;
    if (c < -2048) c = -2048;
    return sample_t'(c);
  endfunction

  initial begin
    for (int j = 0; j < LATENCY; j++) begin
      pipe_i[j] = '0;
      pipe_q[j] = '0;
      pipe_v[j] = 1'b0;
    end
  end

  int phase_cnt = 0;

  always @(posedge clk) begin
    real ti, tq, ri, rq, ph, th, xi, et, hp;
    real ai, pi_, aq, pq;
    ph = PHI * DEG;
    th = THETA * DEG;
    xi = XI * DEG;
    et = LO_PHASE * DEG;
    hp = 90.0 * DEG;
    ti = dac_valid ? real'(dac_i) : 0.0;
    tq = dac_valid ? real'(dac_q) : 0.0;
    // TX carriers as amplitude * cos(wt + phase)
    if (!lo_sw) begin
      ai = 1.0;               pi_ = 0.0;       // cos(wt)
      aq = ALPHA;             pq = th - hp;    // alpha sin(wt + theta)
    end else begin
      ai = LO_GAIN;           pi_ = et - hp;   // gamma sin(wt + eta)
      aq = ALPHA / LO_GAIN;   pq = th - et;    // alpha/gamma cos(wt + theta - eta)
    end
    // LPF{cos(wt+p) cos(wt+q)} = cos(p-q)/2, the 1/2 is inside G
    ri = G * (ai * ti * $cos(pi_ - ph) + aq * tq * $cos(pq - ph));
    rq = G * BETA * (ai * ti * $cos(pi_ - ph - xi + hp) + aq * tq * $cos(pq - ph - xi + hp));
    if (ADC_SKIP > 0) phase_cnt = (phase_cnt + 1) % ADC_SKIP;
    for (int j = LATENCY - 1; j > 0; j--) begin
      pipe_i[j] <= pipe_i[j-1];
      pipe_q[j] <= pipe_q[j-1];
      pipe_v[j] <= pipe_v[j-1];
    end
    pipe_i[0] <= to_code(ri + DC_I);
    pipe_q[0] <= to_code(rq + DC_Q);
    pipe_v[0] <= (ADC_SKIP == 0) || (phase_cnt != 0);
  end

  assign adc_i     = pipe_i[LATENCY-1];
  assign adc_q     = pipe_q[LATENCY-1];
  assign adc_valid = pipe_v[LATENCY-1];

endmodule
