// comp_coef_unit: turns the estimated imbalances into the four gains of the
// compensators, eq. (4) and (5):
//   TX: -tan(theta) and sec(theta)/alpha
//   RX: -tan(xi)    and sec(xi)/beta
// It holds two secant/tangent units and two dividers, one of each per
// direction, matching the operator counts the paper lists for the
// compensator. Both directions run in parallel.
//
// Interface: pulse start with params valid (theta, alpha, xi, beta are used
// and must stay stable until done; the estimator holds them). done pulses
// when coefs is valid; coefs holds until the next completion and resets to
// the identity (tan = 0, k = 1). alpha or beta too small for the quotient to
// fit below 2 gives a saturated gain.
//
// Timing: start edge loads the secant units (1 cycle), the next edge starts
// the dividers (9 cycles), and one more edge registers the gains: done is high
// after 11 edges counting the start edge.
module comp_coef_unit
  import iq_cal_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  iq_params_t params,
  output logic       busy,
  output logic       done,
  output comp_coef_t coefs
);

  logic  st_tx_v, st_rx_v;
  coef_t sec_tx, tan_tx, sec_rx, tan_rx;
  coef_t tan_tx_q, tan_rx_q;
  logic  div_tx_busy, div_tx_done, div_tx_ovf;
  logic  div_rx_busy, div_rx_done, div_rx_ovf;
  logic [COEF_W-1:0] q_tx, q_rx;
  logic  running;

  sec_tan_unit u_sec_tx (
    .clk, .rst_n, .in_valid(start), .x(params.theta),
    .out_valid(st_tx_v), .sec_o(sec_tx), .tan_o(tan_tx)
  );

  sec_tan_unit u_sec_rx (
    .clk, .rst_n, .in_valid(start), .x(params.xi),
    .out_valid(st_rx_v), .sec_o(sec_rx), .tan_o(tan_rx)
  );

  radix4_divider #(.IN_W(COEF_W), .Q_W(COEF_W), .QFRAC(COEF_FRAC)) u_div_tx (
    .clk, .rst_n, .start(st_tx_v),
    .num(sec_tx), .den(params.alpha),
    .busy(div_tx_busy), .done(div_tx_done), .quot(q_tx), .ovf(div_tx_ovf)
  );

  radix4_divider #(.IN_W(COEF_W), .Q_W(COEF_W), .QFRAC(COEF_FRAC)) u_div_rx (
    .clk, .rst_n, .start(st_rx_v),
    .num(sec_rx), .den(params.beta),
    .busy(div_rx_busy), .done(div_rx_done), .quot(q_rx), .ovf(div_rx_ovf)
  );

  function automatic coef_t to_coef(input logic [COEF_W-1:0] q, input logic ovf);
    to_coef = (ovf || q[COEF_W-1]) ? coef_t'((1 << (COEF_W - 1)) - 1) : coef_t'(q);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      coefs    <= COEF_IDENTITY;
      done     <= 1'b0;
      running  <= 1'b0;
      tan_tx_q <= '0;
      tan_rx_q <= '0;
    end else begin
      done <= 1'b0;
      if (start) running <= 1'b1;
      if (st_tx_v) begin
        tan_tx_q <= tan_tx;
        tan_rx_q <= tan_rx;
      end
      if (running && div_tx_done && div_rx_done) begin
        coefs.tx_neg_tan <= -tan_tx_q;
        coefs.tx_k       <= to_coef(q_tx, div_tx_ovf);
        coefs.rx_neg_tan <= -tan_rx_q;
        coefs.rx_k       <= to_coef(q_rx, div_rx_ovf);
        done             <= 1'b1;
        running          <= 1'b0;
      end
    end
  end

  assign busy = running;

  // the two directions are started together and finish together
  assert property (@(posedge clk) disable iff (!rst_n) div_tx_done == div_rx_done);

endmodule
