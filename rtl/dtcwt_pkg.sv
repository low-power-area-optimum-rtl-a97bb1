// dtcwt_pkg: types, widths and filter constants shared by the DTCWT OFDM
// demodulator blocks.
//
// The first decomposition level uses the 10-tap integer Q-shift filters of
// the first DTCWT stage (coefficients scaled by 64 and rounded). They are
// exact here and are realised without multipliers by the distributed
// arithmetic unit (mda_unit). All later levels use the systolic array
// (osa_array), whose four filters are written in the grouped form
//   y = a0(x0+x9) + a1(x1+x2) + a2(x3+x4) + a1(x5+x6) + a3(x7+x8)
// with five pre-added data terms and a five-entry coefficient vector per
// filter. The order of the coefficient vectors follows the data-flow table
// of the array; the numeric values of a0..a3 are a choice of this design
// (taken from the magnitudes of the approximated later-stage Q-shift
// filters, 2, 6, 44 and 15).
//
// Window convention: w[0] is the newest sample, w[9] the oldest, so a
// filter output is sum_n h[n] * w[n] (an ordinary FIR convolution).
package dtcwt_pkg;

  // Received sample width (8-bit signed samples).
  localparam int unsigned IN_W  = 8;
  // Data width between decomposition levels.
  localparam int unsigned DW    = 16;
  // Coefficient width.
  localparam int unsigned CW    = 8;
  // Number of filter taps and of pre-added terms per filter.
  localparam int unsigned NTAP  = 10;
  localparam int unsigned NTERM = 5;
  // Width of one pre-added term and of the PE accumulator.
  localparam int unsigned TW    = DW + 1;
  localparam int unsigned AW    = TW + CW + 3;
  // Coefficients carry a gain of 64; outputs are scaled back by this shift.
  localparam int unsigned SCALE_SH = 6;
  // Deepest fold supported by one processing unit (fold by 4).
  localparam int unsigned MAXF  = 4;

  typedef logic signed [DW-1:0] data_t;
  typedef logic signed [TW-1:0] term_t;
  typedef logic signed [CW-1:0] coef_t;
  typedef logic signed [AW-1:0] acc_t;

  // First-stage DTCWT filters (Table "ls1"), index [filter][n]:
  // 0 = low-pass tree a, 1 = high-pass tree a, 2 = low-pass tree b,
  // 3 = high-pass tree b.
  localparam int LS1 [4][NTAP] = '{
    '{ 0, -6,  6, 45, 45,   6, -6,  1,  1,  0},
    '{ 0, -1,  1,  6,  6, -45, 45, -6, -6,  0},
    '{ 1,  1, -6,  6, 45,  45,  6, -6,  0,  0},
    '{ 0,  0, -6, -6, 45, -45,  6,  6,  1, -1}
  };

  // The three coefficient magnitudes of the first-stage filters. The
  // distributed-arithmetic LUT holds every subset sum of {C_P, C_Q, C_R}.
  localparam int C_P = 45;
  localparam int C_Q = -6;
  localparam int C_R = 1;

  // Distinct coefficient values a0..a3 of the systolic-array filters.
  localparam int OSA_A [4] = '{2, -6, 44, 15};

  // Coefficient vectors streamed into the PEs, one entry per term.
  // PE0 (tree a, first filter) and PE3 (tree b, first filter) share a^0.
  localparam int OSA_V0 [NTERM] = '{OSA_A[0], OSA_A[1], OSA_A[2], OSA_A[1], OSA_A[3]};
  // PE1 (tree a, second filter).
  localparam int OSA_V1 [NTERM] = '{OSA_A[0], OSA_A[3], OSA_A[1], OSA_A[2], OSA_A[1]};
  // PE2 (tree b, second filter).
  localparam int OSA_V2 [NTERM] = '{OSA_A[3], OSA_A[1], OSA_A[2], OSA_A[1], OSA_A[0]};

  // Window taps combined into each pre-added term: term j = w[P0[j]] + w[P1[j]].
  localparam int PAIR0 [NTERM] = '{0, 1, 3, 5, 7};
  localparam int PAIR1 [NTERM] = '{9, 2, 4, 6, 8};

  // Arithmetic right shift by SCALE_SH, then saturation to DW bits.
  function automatic data_t scale_sat(input acc_t v);
    acc_t s;
    s = v >>> SCALE_SH;
    if (s > acc_t'(2**(DW-1) - 1))       return data_t'(2**(DW-1) - 1);
    else if (s < -acc_t'(2**(DW-1)))     return data_t'(-(2**(DW-1)));
    else                                 return data_t'(s);
  endfunction

endpackage
