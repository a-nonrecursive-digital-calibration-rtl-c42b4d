// cal_controller: the data-picking sequence of the LO-switching calibration.
//
// One calibration runs these phases, each over a fixed number of ADC samples:
//   DCOFF  no training signal                 -> DC offsets of I_rx and Q_rx
//   P12    I_tx = c, Q_tx = 0, LO direct      -> I_rx = path 1, Q_rx = path 2
//   P3     I_tx = 0, Q_tx = c, LO direct      -> I_rx = path 3 (Q_rx ignored)
//   P45    I_tx = c, Q_tx = 0, LO switched    -> I_rx = path 4, Q_rx = path 5
//   P6     I_tx = 0, Q_tx = c, LO switched    -> I_rx = path 6 (Q_rx ignored)
// then it starts the parameter estimator (EST), and when that is done the
// coefficient unit (COEF), and pulses cal_done. The TX-RX loop-back switch is
// closed from DCOFF to P6 and lo_sw selects the 90-degree-shifted LO in P45
// and P6.
//
// In every phase the first SETTLE samples are dropped (time for the DACs,
// filters and ADCs to settle after a change of the training signal or of the
// LO) and the next 2^AVG_LOG2 samples are summed. The sum becomes an average
// with PATH_FRAC fractional bits and, from P12 on, the DC offset learnt in
// DCOFF is subtracted before the value is stored in paths.
//
// Interface: cal_start pulses to begin (ignored while busy). adc_valid marks
// an ADC sample on adc_i/adc_q. tx_i_train/tx_q_train are the training codes
// to send to the DACs while cal_busy is high. est_start/coef_start pulse once
// each; est_done/coef_done are the units' done pulses.
//
// Timing: each phase lasts SETTLE + 2^AVG_LOG2 valid samples. The phase order
// and the switch settings follow the paper's calibration time diagram; the
// settle and averaging lengths, the amplitude c = 2^C_LOG2 codes and the
// handshake are this design's choice.
module cal_controller
  import iq_cal_pkg::*;
#(
  parameter int unsigned C_LOG2   = 9,   // training amplitude c = 2^C_LOG2 codes
  parameter int unsigned SETTLE   = 16,  // samples dropped at the start of a phase
  parameter int unsigned AVG_LOG2 = 6    // 2^AVG_LOG2 samples averaged per phase
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       cal_start,
  input  logic       adc_valid,
  input  sample_t    adc_i,
  input  sample_t    adc_q,
  input  logic       est_done,
  input  logic       coef_done,
  output cal_state_t state,
  output logic       cal_busy,
  output logic       cal_done,
  output logic       loopback_en,
  output logic       lo_sw,
  output sample_t    tx_i_train,
  output sample_t    tx_q_train,
  output logic       est_start,
  output logic       coef_start,
  output path_t      dc_i,
  output path_t      dc_q,
  output path_set_t  paths
);

  localparam int unsigned NAVG  = 1 << AVG_LOG2;
  localparam int unsigned PHASE = SETTLE + NAVG;
  localparam int unsigned CNT_W = $clog2(PHASE + 1);
  localparam int unsigned ACC_W = SAMPLE_W + AVG_LOG2 + 1;
  localparam int unsigned AW    = ACC_W + PATH_FRAC + 2;

  typedef logic signed [ACC_W-1:0] acc_t;
  typedef logic signed [AW-1:0]    wide_t;

  localparam sample_t C_AMP = sample_t'(1 << C_LOG2);

  logic [CNT_W-1:0] cnt_q;
  acc_t  acc_i, acc_q, acc_i_nxt, acc_q_nxt;
  wide_t avg_i, avg_q, val_i, val_q;
  logic  measuring, last_sample;

  function automatic path_t sat_path(input wide_t v);
    if (v > wide_t'((1 << (PATH_W - 1)) - 1))  sat_path = path_t'((1 << (PATH_W - 1)) - 1);
    else if (v < -wide_t'(1 << (PATH_W - 1)))  sat_path = path_t'(-(1 << (PATH_W - 1)));
    else                                       sat_path = path_t'(v);
  endfunction

  assign measuring   = (state inside {CAL_DCOFF, CAL_P12, CAL_P3, CAL_P45, CAL_P6});
  assign last_sample = measuring && adc_valid && (cnt_q == CNT_W'(PHASE - 1));

  always_comb begin
    acc_i_nxt = acc_i + acc_t'(adc_i);
    acc_q_nxt = acc_q + acc_t'(adc_q);
    // average with PATH_FRAC fractional bits
    avg_i = (wide_t'(acc_i_nxt) <<< PATH_FRAC) >>> AVG_LOG2;
    avg_q = (wide_t'(acc_q_nxt) <<< PATH_FRAC) >>> AVG_LOG2;
    val_i = avg_i - wide_t'(dc_i);
    val_q = avg_q - wide_t'(dc_q);
  end

  // training signal and switch settings, from the calibration time diagram
  always_comb begin
    tx_i_train  = (state == CAL_P12 || state == CAL_P45) ? C_AMP : '0;
    tx_q_train  = (state == CAL_P3  || state == CAL_P6)  ? C_AMP : '0;
    lo_sw       = (state == CAL_P45 || state == CAL_P6);
    loopback_en = measuring;
    cal_busy    = (state != CAL_IDLE);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= CAL_IDLE;
      cnt_q      <= '0;
      acc_i      <= '0;
      acc_q      <= '0;
      dc_i       <= '0;
      dc_q       <= '0;
      paths      <= '0;
      est_start  <= 1'b0;
      coef_start <= 1'b0;
      cal_done   <= 1'b0;
    end else begin
      est_start  <= 1'b0;
      coef_start <= 1'b0;
      cal_done   <= 1'b0;

      if (measuring && adc_valid) begin
        if (last_sample) begin
          cnt_q <= '0;
          acc_i <= '0;
          acc_q <= '0;
        end else begin
          cnt_q <= cnt_q + 1'b1;
          if (cnt_q >= CNT_W'(SETTLE)) begin
            acc_i <= acc_i_nxt;
            acc_q <= acc_q_nxt;
          end
        end
      end

      unique case (state)
        CAL_IDLE: if (cal_start) begin
          state <= CAL_DCOFF;
          cnt_q <= '0;
          acc_i <= '0;
          acc_q <= '0;
        end
        CAL_DCOFF: if (last_sample) begin
          dc_i  <= sat_path(avg_i);
          dc_q  <= sat_path(avg_q);
          state <= CAL_P12;
        end
        CAL_P12: if (last_sample) begin
          paths.i1 <= sat_path(val_i);
          paths.q2 <= sat_path(val_q);
          state    <= CAL_P3;
        end
        CAL_P3: if (last_sample) begin
          paths.i3 <= sat_path(val_i);
          state    <= CAL_P45;
        end
        CAL_P45: if (last_sample) begin
          paths.i4 <= sat_path(val_i);
          paths.q5 <= sat_path(val_q);
          state    <= CAL_P6;
        end
        CAL_P6: if (last_sample) begin
          paths.i6  <= sat_path(val_i);
          est_start <= 1'b1;
          state     <= CAL_EST;
        end
        CAL_EST: if (est_done) begin
          coef_start <= 1'b1;
          state      <= CAL_COEF;
        end
        CAL_COEF: if (coef_done) begin
          cal_done <= 1'b1;
          state    <= CAL_DONE;
        end
        CAL_DONE: state <= CAL_IDLE;
        default:  state <= CAL_IDLE;
      endcase
    end
  end

  // only one training input is driven at a time
  assert property (@(posedge clk) disable iff (!rst_n) !(tx_i_train != 0 && tx_q_train != 0));

endmodule
