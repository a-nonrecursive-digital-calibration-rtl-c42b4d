// param_estimator: solves the overall gain G and phase phi of the loop-back
// path and the TX/RX gain and phase imbalances (alpha, theta, beta, xi) from
// the six path values picked by the calibration sequence. It evaluates
// eq. (12)-(17) without any iteration over the data, using one shared CORDIC
// three times and one divider:
//
//   pass 0: CORDIC(x = I1, y = -I4) -> |.| = G*c, angle = phi
//   pass 1: CORDIC(x = I6, y =  I3) -> |.| = alpha*G*c, theta = angle + phi
//   pass 2: CORDIC(x = Q5, y =  Q2) -> |.| = beta*G*c,  xi    = angle - phi
//   alpha = |pass 1| / |pass 0|, beta = |pass 2| / |pass 0|
//
// The y input of pass 0 is -I4 because path 4 carries -(cAB/2) sin(phi); this
// makes atan2 return +phi, the value that eq. (15) and (17) add and subtract.
// theta and xi are wrapped back into [-pi, pi] after the addition.
// The training amplitude c cancels in alpha and beta; G is scaled by
// c = 2^C_LOG2 converter codes with a shift.
//
// Interface: pulse start with paths valid (they are registered at start);
// done pulses for one cycle when params is valid; params holds until the next
// start. Formats: G, alpha, beta coef_t (Q2.14); phi, theta, xi angle_t
// (radians Q3.13).
//
// Timing: the three CORDIC passes run back to back, 25 cycles each (75, the
// paper's figure). The alpha division overlaps pass 2; the beta division
// follows it (9 cycles) and one more edge registers the result: done is high
// after 85 clock edges counting the start edge. How G^-1 is applied is not
// given by the paper; the shared divider is this design's choice.
module param_estimator
  import iq_cal_pkg::*;
#(
  parameter int unsigned C_LOG2      = 9,   // training amplitude c = 2^C_LOG2 codes
  parameter int unsigned CORDIC_ITER = 24
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  path_set_t  paths,
  output logic       busy,
  output logic       done,
  output iq_params_t params
);

  typedef enum logic [2:0] {E_IDLE, E_PASS0, E_PASS1, E_PASS2, E_DIV} est_state_t;

  est_state_t state;
  path_set_t  paths_q;

  logic            cor_start, cor_busy, cor_done;
  path_t           cor_x, cor_y;
  logic [PATH_W:0] cor_mag;
  angle_t          cor_ang;

  logic            div_start, div_busy, div_done, div_ovf;
  logic [PATH_W:0] div_num, g_mag_q;
  logic [COEF_W-1:0] div_quot;

  function automatic path_t neg_sat(input path_t v);
    neg_sat = (v == path_t'(1 << (PATH_W - 1))) ? path_t'((1 << (PATH_W - 1)) - 1) : -v;
  endfunction

  // operand selection for the next CORDIC pass
  always_comb begin
    cor_start = 1'b0;
    cor_x     = paths.i1;
    cor_y     = neg_sat(paths.i4);
    unique case (state)
      E_IDLE:  cor_start = start;
      E_PASS0: begin
        cor_start = cor_done;
        cor_x     = paths_q.i6;
        cor_y     = paths_q.i3;
      end
      E_PASS1: begin
        cor_start = cor_done;
        cor_x     = paths_q.q5;
        cor_y     = paths_q.q2;
      end
      default: ;
    endcase
  end

  assign div_start = cor_done && (state == E_PASS1 || state == E_PASS2);
  assign div_num   = cor_mag;

  cordic_vectoring #(.ITER(CORDIC_ITER)) u_cordic (
    .clk, .rst_n,
    .start (cor_start),
    .x_in  (cor_x),
    .y_in  (cor_y),
    .busy  (cor_busy),
    .done  (cor_done),
    .mag   (cor_mag),
    .angle (cor_ang)
  );

  radix4_divider #(.IN_W(PATH_W + 1), .Q_W(COEF_W), .QFRAC(COEF_FRAC)) u_div (
    .clk, .rst_n,
    .start (div_start),
    .num   (div_num),
    .den   (g_mag_q),
    .busy  (div_busy),
    .done  (div_done),
    .quot  (div_quot),
    .ovf   (div_ovf)
  );

  // G = |pass 0| / (c * 2^PATH_FRAC), to Q2.14, saturated
  localparam int unsigned GW = PATH_W + 1 + COEF_FRAC;
  logic [GW-1:0] g_full;
  coef_t         g_sat;
  always_comb begin
    g_full = (GW'(cor_mag) << COEF_FRAC) >> (PATH_FRAC + C_LOG2);
    g_sat  = (g_full > GW'((1 << (COEF_W - 1)) - 1)) ? coef_t'((1 << (COEF_W - 1)) - 1)
                                                     : coef_t'(g_full);
  end

  // sum or difference of two angles, wrapped back into [-pi, pi]
  localparam int signed PI_A = 25736;  // pi in Q3.13
  function automatic angle_t wrap_add(input angle_t a, input angle_t b, input logic sub);
    logic signed [ANG_W:0] s;
    s = sub ? ((ANG_W+1)'(a) - (ANG_W+1)'(b)) : ((ANG_W+1)'(a) + (ANG_W+1)'(b));
    if (s > (ANG_W+1)'(PI_A))       s = s - (ANG_W+1)'(2 * PI_A);
    else if (s < -(ANG_W+1)'(PI_A)) s = s + (ANG_W+1)'(2 * PI_A);
    wrap_add = angle_t'(s);
  endfunction

  // gains are Q2.14 signed: keep the unsigned quotient below +2
  function automatic coef_t quot_to_coef(input logic [COEF_W-1:0] q);
    quot_to_coef = q[COEF_W-1] ? coef_t'((1 << (COEF_W - 1)) - 1) : coef_t'(q);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= E_IDLE;
      done    <= 1'b0;
      paths_q <= '0;
      g_mag_q <= '0;
      params  <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        E_IDLE: if (start) begin
          paths_q <= paths;
          state   <= E_PASS0;
        end
        E_PASS0: if (cor_done) begin
          g_mag_q    <= cor_mag;
          params.g   <= g_sat;
          params.phi <= cor_ang;
          state      <= E_PASS1;
        end
        E_PASS1: if (cor_done) begin
          params.theta <= wrap_add(cor_ang, params.phi, 1'b0);
          state        <= E_PASS2;
        end
        E_PASS2: begin
          if (div_done) params.alpha <= quot_to_coef(div_quot);
          if (cor_done) begin
            params.xi <= wrap_add(cor_ang, params.phi, 1'b1);
            state     <= E_DIV;
          end
        end
        E_DIV: if (div_done) begin
          params.beta <= quot_to_coef(div_quot);
          done        <= 1'b1;
          state       <= E_IDLE;
        end
        default: state <= E_IDLE;
      endcase
    end
  end

  assign busy = (state != E_IDLE);

  // the divider must be free whenever a pass hands it a magnitude
  assert property (@(posedge clk) disable iff (!rst_n) div_start |-> !div_busy);

endmodule
