// sec_tan_unit: secant and tangent of a small phase-imbalance angle, in one
// clock cycle.
//
// The compensators of eq. (4) and (5) need sec and tan of the TX phase
// imbalance theta and the RX phase imbalance xi. These angles are a few
// degrees, so truncated Maclaurin series are used:
//   sec x = 1 + x^2/2 + 5 x^4/24
//   tan x = x + x^3/3 + 2 x^5/15
// evaluated in Q.28 fixed point (the constant fractions 5/24, 1/3 and 2/15 are
// rounded to 16 bits). The error stays below 2^-14, one output LSB, for
// |x| <= 0.25 rad (about 14 degrees); beyond 0.5 rad the series loses
// accuracy. The input is clamped to +-1 rad and the outputs to +-2.
//
// Interface: in_valid/x (angle_t, radians Q3.13) -> out_valid/sec_o/tan_o
// (coef_t, Q2.14) one cycle later, fully pipelined. The paper only names a
// one-cycle secant operator; the series evaluation is this design's choice.
module sec_tan_unit
  import iq_cal_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  angle_t x,
  output logic   out_valid,
  output coef_t  sec_o,
  output coef_t  tan_o
);

  localparam int unsigned F = 28;  // fractional bits of the intermediates

  typedef logic signed [63:0] acc_t;

  localparam acc_t C5_24 = 64'sd13653;  // 5/24 * 2^16
  localparam acc_t C1_3  = 64'sd21845;  // 1/3  * 2^16
  localparam acc_t C2_15 = 64'sd8738;   // 2/15 * 2^16
  localparam acc_t ONE_F = 64'sd1 <<< F;
  localparam acc_t CMAX  = acc_t'((1 << (COEF_W - 1)) - 1);

  acc_t a, x1, x2, x3, x4, x5, sec_f, tan_f, sec_c, tan_c;

  function automatic coef_t sat_coef(input acc_t v);
    if (v > CMAX)       sat_coef = coef_t'(CMAX);
    else if (v < -CMAX) sat_coef = coef_t'(-CMAX);
    else                sat_coef = coef_t'(v);
  endfunction

  always_comb begin
    // clamp to +-1 rad so that the powers cannot overflow
    a     = acc_t'(x);
    if (a > (64'sd1 <<< ANG_FRAC))  a = 64'sd1 <<< ANG_FRAC;
    if (a < -(64'sd1 <<< ANG_FRAC)) a = -(64'sd1 <<< ANG_FRAC);
    x1    = a <<< (F - ANG_FRAC);
    x2    = (a * a) <<< (F - 2 * ANG_FRAC);
    x3    = (x2 * a) >>> ANG_FRAC;
    x4    = (x2 * x2) >>> F;
    x5    = (x4 * a) >>> ANG_FRAC;
    sec_f = ONE_F + (x2 >>> 1) + ((x4 * C5_24) >>> 16);
    tan_f = x1 + ((x3 * C1_3) >>> 16) + ((x5 * C2_15) >>> 16);
    // round to Q2.14
    sec_c = (sec_f + (64'sd1 <<< (F - COEF_FRAC - 1))) >>> (F - COEF_FRAC);
    tan_c = (tan_f + (64'sd1 <<< (F - COEF_FRAC - 1))) >>> (F - COEF_FRAC);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      sec_o     <= COEF_ONE;
      tan_o     <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        sec_o <= sat_coef(sec_c);
        tan_o <= sat_coef(tan_c);
      end
    end
  end

endmodule
