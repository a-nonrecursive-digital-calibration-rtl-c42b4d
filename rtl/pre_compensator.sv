// pre_compensator: TX I/Q-imbalance precompensation, eq. (4):
//   I_pre = I_tx - tan(theta) * Q_tx
//   Q_pre = sec(theta)/alpha * Q_tx
// Applying this before the imbalanced TX (I + alpha sin(theta) Q,
// alpha cos(theta) Q) gives back the ideal I_tx, Q_tx at RF.
//
// Structure as in the paper's block diagram: two constant-coefficient
// multipliers on the Q branch and one adder into the I branch. Products are
// rounded from Q2.14 to integer codes and the outputs saturate to 12 bits.
//
// Interface: one sample per cycle when in_valid is high; outputs and
// out_valid follow one cycle later (the paper's one-cycle multiply and
// add). neg_tan and k come from the coefficient unit (coef_t, Q2.14) and may
// change at any time; they take effect on the next sample.
module pre_compensator
  import iq_cal_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  sample_t i_in,
  input  sample_t q_in,
  input  coef_t   neg_tan,   // -tan(theta)
  input  coef_t   k,         // sec(theta)/alpha
  output logic    out_valid,
  output sample_t i_out,
  output sample_t q_out
);

  localparam int unsigned PW = SAMPLE_W + COEF_W + 1;
  typedef logic signed [PW-1:0] prod_t;

  localparam prod_t SMAX = prod_t'((1 << (SAMPLE_W - 1)) - 1);
  localparam prod_t SMIN = -prod_t'(1 << (SAMPLE_W - 1));
  localparam prod_t HALF = prod_t'(1 << (COEF_FRAC - 1));

  function automatic sample_t sat(input prod_t v);
    if (v > SMAX)      sat = sample_t'(SMAX);
    else if (v < SMIN) sat = sample_t'(SMIN);
    else               sat = sample_t'(v);
  endfunction

  prod_t x_term, gain, i_sum;
  always_comb begin
    x_term = (prod_t'(neg_tan) * prod_t'(q_in) + HALF) >>> COEF_FRAC;
    gain  = (prod_t'(k) * prod_t'(q_in) + HALF) >>> COEF_FRAC;
    i_sum = prod_t'(i_in) + x_term;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      i_out     <= '0;
      q_out     <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        i_out <= sat(i_sum);
        q_out <= sat(gain);
      end
    end
  end

endmodule
