// post_compensator: RX I/Q-imbalance postcompensation, eq. (5):
//   I_post = I_rx
//   Q_post = -tan(xi) * I_rx + sec(xi)/beta * Q_rx
// Applied to the imbalanced RX output (I, beta sin(xi) I + beta cos(xi) Q) it
// restores the ideal down-converted I and Q.
//
// Structure as in the paper's block diagram: two constant-coefficient
// multipliers and one adder into the Q branch; the I branch is only delayed.
// Products are rounded from Q2.14 and the outputs saturate to 12 bits.
//
// Interface: one sample per cycle when in_valid is high; outputs and
// out_valid follow one cycle later. neg_tan and k (coef_t, Q2.14) come from
// the coefficient unit.
module post_compensator
  import iq_cal_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  sample_t i_in,
  input  sample_t q_in,
  input  coef_t   neg_tan,   // -tan(xi)
  input  coef_t   k,         // sec(xi)/beta
  output logic    out_valid,
  output sample_t i_out,
  output sample_t q_out
);

  localparam int unsigned PW = SAMPLE_W + COEF_W + 2;
  typedef logic signed [PW-1:0] prod_t;

  localparam prod_t SMAX = prod_t'((1 << (SAMPLE_W - 1)) - 1);
  localparam prod_t SMIN = -prod_t'(1 << (SAMPLE_W - 1));
  localparam prod_t HALF = prod_t'(1 << (COEF_FRAC - 1));

  function automatic sample_t sat(input prod_t v);
    if (v > SMAX)      sat = sample_t'(SMAX);
    else if (v < SMIN) sat = sample_t'(SMIN);
    else               sat = sample_t'(v);
  endfunction

  prod_t q_sum;
  always_comb
    q_sum = (prod_t'(neg_tan) * prod_t'(i_in) + prod_t'(k) * prod_t'(q_in) + HALF) >>> COEF_FRAC;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      i_out     <= '0;
      q_out     <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        i_out <= i_in;
        q_out <= sat(q_sum);
      end
    end
  end

endmodule
