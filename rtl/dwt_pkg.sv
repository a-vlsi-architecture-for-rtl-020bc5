// dwt_pkg: types and constants shared by the lifting DWT datapath.
//
// The datapath is built around one operation, the lifting step of Fig.-4
// style processors: y = c + sign * K * (a + b), where K is either a power of
// two (done by an arithmetic shifter) or a fixed-point constant (done by a
// multiplier). A processor is programmed with a lift_cfg_t. Sample width,
// coefficient width and the number of fraction bits of the coefficients are
// this design's own choices; the reference architecture does not give them.
package dwt_pkg;

  // Sample word width (two's complement).
  parameter int unsigned DW   = 16;
  // Multiplier coefficient width and its number of fraction bits.
  parameter int unsigned CW   = 16;
  parameter int unsigned FRAC = 14;

  typedef logic signed [DW-1:0] sample_t;
  typedef logic signed [CW-1:0] coef_t;

  // Programming of one processor (Fig. 4): after the first adder the sum
  // goes either through the multiplier (use_mult) or through the shifter
  // (arithmetic right shift by 'shift'), then the second adder adds the
  // result to c, or subtracts it from c when 'sub' is set.
  typedef struct packed {
    logic        use_mult;
    logic [3:0]  shift;
    coef_t       coef;
    logic        sub;
  } lift_cfg_t;

  // Shift/multiply unit programming (diagonal K1/K2 matrix).
  typedef enum logic [1:0] {
    SM_PASS  = 2'd0,   // K = 1
    SM_SHL   = 2'd1,   // K = 2^shift
    SM_SHR   = 2'd2,   // K = 2^-shift
    SM_MULT  = 2'd3    // K = coef / 2^FRAC
  } sm_mode_e;

  typedef struct packed {
    sm_mode_e    mode;
    logic [3:0]  shift;
    coef_t       coef;
  } sm_cfg_t;

  // Subband of a coefficient, from the parity of its row and column in the
  // in-place (interleaved) layout: odd column = horizontal high pass,
  // odd row = vertical high pass.
  typedef enum logic [1:0] {
    BAND_LL = 2'b00,
    BAND_HL = 2'b01,
    BAND_LH = 2'b10,
    BAND_HH = 2'b11
  } band_e;

  // (5,3) filter, factorised as in the reference: first step a = -0.5
  // (high pass, y_odd = x_odd - (x_even_left + x_even_right)/2), second
  // step b = 0.25 (low pass, y_even = x_even + (y_odd_left + y_odd_right)/4).
  localparam lift_cfg_t CFG53_HP = '{use_mult: 1'b0, shift: 4'd1, coef: '0, sub: 1'b1};
  localparam lift_cfg_t CFG53_LP = '{use_mult: 1'b0, shift: 4'd2, coef: '0, sub: 1'b0};
  // (5,3) has no diagonal matrix: K1 = K2 = 1.
  localparam sm_cfg_t   SM_UNITY = '{mode: SM_PASS, shift: 4'd0, coef: '0};

  // Filters the controller can schedule.
  typedef enum logic {
    FILT_53 = 1'b0,    // two lifting matrices (2M), reversible integer (5,3)
    FILT_97 = 1'b1     // four lifting matrices (4M) plus diagonal, (9,7)
  } filter_e;

  // (9,7) lifting coefficients of the JPEG2000 irreversible transform,
  // rounded to FRAC = 14 fraction bits:
  //   alpha = -1.586134342, beta = -0.052980119, gamma = 0.882911076,
  //   delta = 0.443506852,  K = 1.230174105 (high pass x K, low pass x 1/K).
  localparam lift_cfg_t CFG97_A = '{use_mult: 1'b1, shift: 4'd0, coef: -16'sd25987, sub: 1'b0};
  localparam lift_cfg_t CFG97_B = '{use_mult: 1'b1, shift: 4'd0, coef: -16'sd868,   sub: 1'b0};
  localparam lift_cfg_t CFG97_C = '{use_mult: 1'b1, shift: 4'd0, coef: 16'sd14466,  sub: 1'b0};
  localparam lift_cfg_t CFG97_D = '{use_mult: 1'b1, shift: 4'd0, coef: 16'sd7266,   sub: 1'b0};
  localparam sm_cfg_t   SM97_HI = '{mode: SM_MULT, shift: 4'd0, coef: 16'sd20155};
  localparam sm_cfg_t   SM97_LO = '{mode: SM_MULT, shift: 4'd0, coef: 16'sd13318};

endpackage
