// iq_cal_pkg: shared widths, fixed-point formats and types of the LO-switching
// I/Q-imbalance calibration.
//
// Number formats used throughout:
//   sample_t  12-bit signed converter code (DAC and ADC are both 12 bit).
//   path_t    16-bit signed averaged path value, in converter LSBs with
//             PATH_FRAC fractional bits (Q12.4).
//   angle_t   16-bit signed angle in radians with ANG_FRAC fractional bits
//             (Q3.13, range about +-4 rad).
//   coef_t    16-bit signed gain with COEF_FRAC fractional bits (Q2.14, range
//             +-2). Used for G, alpha, beta and the compensator gains.
// The 12-bit converter width is the paper's; the other formats are this
// design's choice.
package iq_cal_pkg;

  localparam int unsigned SAMPLE_W  = 12;
  localparam int unsigned PATH_W    = 16;
  localparam int unsigned PATH_FRAC = 4;
  localparam int unsigned ANG_W     = 16;
  localparam int unsigned ANG_FRAC  = 13;
  localparam int unsigned COEF_W    = 16;
  localparam int unsigned COEF_FRAC = 14;

  // CORDIC angle accumulator: radians with Z_FRAC fractional bits.
  localparam int unsigned Z_W    = 28;
  localparam int unsigned Z_FRAC = 24;

  typedef logic signed [SAMPLE_W-1:0] sample_t;
  typedef logic signed [PATH_W-1:0]   path_t;
  typedef logic signed [ANG_W-1:0]    angle_t;
  typedef logic signed [COEF_W-1:0]   coef_t;

  // 1.0 in coef_t
  localparam coef_t COEF_ONE = coef_t'(1 << COEF_FRAC);

  // The six averaged, offset-free path values picked during calibration
  // (paths 1..6 of the LO-switching model).
  typedef struct packed {
    path_t i1;  // I_rx, I_tx = c, LO direct
    path_t q2;  // Q_rx, I_tx = c, LO direct
    path_t i3;  // I_rx, Q_tx = c, LO direct
    path_t i4;  // I_rx, I_tx = c, LO switched by 90 degrees
    path_t q5;  // Q_rx, I_tx = c, LO switched
    path_t i6;  // I_rx, Q_tx = c, LO switched
  } path_set_t;

  // Estimated imbalance parameters, eq. (12)-(17).
  typedef struct packed {
    coef_t  g;      // overall gain AB/2
    angle_t phi;    // overall phase shift
    coef_t  alpha;  // TX gain imbalance
    angle_t theta;  // TX phase imbalance
    coef_t  beta;   // RX gain imbalance
    angle_t xi;     // RX phase imbalance
  } iq_params_t;

  // Compensator gains, eq. (4) and (5).
  typedef struct packed {
    coef_t tx_neg_tan;  // -tan(theta)
    coef_t tx_k;        // sec(theta)/alpha
    coef_t rx_neg_tan;  // -tan(xi)
    coef_t rx_k;        // sec(xi)/beta
  } comp_coef_t;

  localparam comp_coef_t COEF_IDENTITY = '{
    tx_neg_tan: '0, tx_k: COEF_ONE, rx_neg_tan: '0, rx_k: COEF_ONE};

  // Calibration phases of the data-picking sequence.
  typedef enum logic [3:0] {
    CAL_IDLE,
    CAL_DCOFF,   // pre-read: learn DC offsets, no training signal
    CAL_P12,     // I_tx = c, LO direct   -> I_rx path 1, Q_rx path 2
    CAL_P3,      // Q_tx = c, LO direct   -> I_rx path 3
    CAL_P45,     // I_tx = c, LO switched -> I_rx path 4, Q_rx path 5
    CAL_P6,      // Q_tx = c, LO switched -> I_rx path 6
    CAL_EST,     // parameter estimation running
    CAL_COEF,    // compensator gains being computed
    CAL_DONE
  } cal_state_t;

  // atan(2^-i) in radians, scaled by 2^24 and rounded to the nearest integer.
  function automatic logic [27:0] atan_tab(input int unsigned i);
    case (i)
      0:  atan_tab = 28'd13176795;
      1:  atan_tab = 28'd7778716;
      2:  atan_tab = 28'd4110060;
      3:  atan_tab = 28'd2086331;
      4:  atan_tab = 28'd1047214;
      5:  atan_tab = 28'd524117;
      6:  atan_tab = 28'd262123;
      7:  atan_tab = 28'd131069;
      default: atan_tab = (i <= 24) ? (28'd1 << (24 - i)) : 28'd0;
    endcase
  endfunction

  // pi/2 scaled by 2^24
  localparam logic [27:0] HALF_PI_Z = 28'd26353589;

  // 1/K of the CORDIC (product of sqrt(1+2^-2i)), scaled by 2^16.
  localparam int unsigned CORDIC_INV_K = 39797;

endpackage
