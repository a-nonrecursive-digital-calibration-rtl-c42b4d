// cordic_vectoring: iterative CORDIC in vectoring mode. Returns the magnitude
// sqrt(x^2 + y^2) and the angle atan2(y, x) of the input vector.
//
// This is the single CORDIC operator of the parameter estimator. It needs only
// shifts and adders: after a quadrant pre-rotation that brings x >= 0 (by
// +-90 degrees), ITER micro-rotations by +-atan(2^-i) drive y to zero while
// the rotated angles are summed in z. The CORDIC gain K is removed from the
// magnitude by a constant multiply (1/K = 0.60725) in the output register.
//
// Interface: pulse start for one cycle with x_in/y_in valid. busy is high
// while it works; done pulses for one cycle with mag/angle valid, which then
// hold until the next start. Inputs are path_t (Q12.4); mag is unsigned with
// the same scale as the inputs and PATH_W+1 bits; angle is angle_t (radians,
// Q3.13), in (-pi, pi].
//
// Timing: the operation takes ITER+1 clock edges: the edge that samples start
// loads the pre-rotated vector, and ITER edges iterate; the last of these also
// loads the output registers, and done is high right after it. With the
// default ITER = 24 that is 25 cycles, the paper's CORDIC latency. A new
// start is accepted in the cycle done is high, so passes run back to back. Ports, number
// formats and the use of 24 iterations are this design's choice.
module cordic_vectoring
  import iq_cal_pkg::*;
#(
  parameter int unsigned ITER  = 24,  // micro-rotations; latency = ITER+1
  parameter int unsigned GUARD = 6    // extra fractional bits inside
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  path_t               x_in,
  input  path_t               y_in,
  output logic                busy,
  output logic                done,
  output logic [PATH_W:0]     mag,
  output angle_t              angle
);

  localparam int unsigned XY_W  = PATH_W + 2 + GUARD;
  localparam int unsigned CNT_W = $clog2(ITER + 1);

  typedef logic signed [XY_W-1:0] xy_t;
  typedef logic signed [Z_W-1:0]  z_t;

  xy_t x_q, y_q;
  z_t  z_q;
  logic [CNT_W-1:0] cnt_q;

  // quadrant pre-rotation
  xy_t x_ext, y_ext, x_pre, y_pre;
  z_t  z_pre;
  always_comb begin
    x_ext = xy_t'(x_in) <<< GUARD;
    y_ext = xy_t'(y_in) <<< GUARD;
    if (x_in >= 0) begin
      x_pre = x_ext;
      y_pre = y_ext;
      z_pre = '0;
    end else if (y_in >= 0) begin
      // rotate by -90 degrees: (x, y) -> (y, -x)
      x_pre = y_ext;
      y_pre = -x_ext;
      z_pre = z_t'(HALF_PI_Z);
    end else begin
      // rotate by +90 degrees: (x, y) -> (-y, x)
      x_pre = -y_ext;
      y_pre = x_ext;
      z_pre = -z_t'(HALF_PI_Z);
    end
  end

  // one micro-rotation
  xy_t x_nxt, y_nxt, x_sh, y_sh;
  z_t  z_nxt, atan_i;
  always_comb begin
    x_sh   = x_q >>> cnt_q;
    y_sh   = y_q >>> cnt_q;
    atan_i = z_t'(atan_tab(32'(cnt_q)) >> (24 - Z_FRAC));
    if (y_q < 0) begin
      x_nxt = x_q - y_sh;
      y_nxt = y_q + x_sh;
      z_nxt = z_q - atan_i;
    end else begin
      x_nxt = x_q + y_sh;
      y_nxt = y_q - x_sh;
      z_nxt = z_q + atan_i;
    end
  end

  // output scaling: remove CORDIC gain, round to output formats
  localparam int unsigned PROD_W = XY_W + 17;
  logic [PROD_W-1:0] mag_prod;
  z_t                z_rnd;
  always_comb begin
    mag_prod = PROD_W'(x_nxt) * PROD_W'(CORDIC_INV_K)
             + (PROD_W'(1) << (16 + GUARD - 1));
    z_rnd    = (z_nxt + (z_t'(1) <<< (Z_FRAC - ANG_FRAC - 1))) >>> (Z_FRAC - ANG_FRAC);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      done  <= 1'b0;
      cnt_q <= '0;
      x_q   <= '0;
      y_q   <= '0;
      z_q   <= '0;
      mag   <= '0;
      angle <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy  <= 1'b1;
        cnt_q <= '0;
        x_q   <= x_pre;
        y_q   <= y_pre;
        z_q   <= z_pre;
      end else if (busy) begin
        x_q   <= x_nxt;
        y_q   <= y_nxt;
        z_q   <= z_nxt;
        cnt_q <= cnt_q + 1'b1;
        if (cnt_q == CNT_W'(ITER - 1)) begin
          busy  <= 1'b0;
          done  <= 1'b1;
          mag   <= (PATH_W+1)'(mag_prod >> (16 + GUARD));
          angle <= angle_t'(z_rnd);
        end
      end
    end
  end

  // x stays non-negative after the pre-rotation, so the magnitude is valid
  assert property (@(posedge clk) disable iff (!rst_n) busy |-> x_q >= 0);

endmodule
