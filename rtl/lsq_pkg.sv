// lsq_pkg: constants and types shared by the logarithmic square / square-root unit.
//
// The unit works in the base-2 logarithm domain. Both converters approximate a
// function on [0,1) with eight equal-width straight-line segments. Segment s
// covers [s/8, (s+1)/8) and is selected by the three most significant fraction
// bits. On segment s the approximation is
//     y = f * (1 + C[s]/256) + B[s] / 2^14
// so every slope is 1 plus or minus a sum of powers of two with exponents -1 to
// -8, and every segment reduces to a few shifted copies of f plus one constant.
// The coefficient values are those published for the eight-segment converters:
// LOG_* approximates log2(1+f), ALOG_* approximates 2^f.
package lsq_pkg;

  // Operation selected in the logarithm domain.
  typedef enum logic {
    MODE_SQUARE = 1'b0,  // log2(A^2)  = 2 * log2(A)
    MODE_SQRT   = 1'b1   // log2(A^.5) = log2(A) / 2
  } mode_e;

  localparam int SEG_W    = 3;   // log2 of the number of segments
  localparam int NSEG     = 8;
  localparam int SLOPE_SH = 8;   // slope corrections are in units of 2^-8
  localparam int BETA_FW  = 14;  // offsets are in units of 2^-14

  typedef int coef_t [NSEG];

  // log2(1+f) ~= f*(1 + LOG_C/256) + LOG_B/2^14
  localparam coef_t LOG_C  = '{92, 55, 24, 0, -20, -36, -52, -64};
  localparam coef_t LOG_B  = '{0, 296, 792, 1380, 2032, 2668, 3432, 4096};

  // 2^f ~= f*(1 + ALOG_C/256) + ALOG_B/2^14
  localparam coef_t ALOG_C = '{-71, -54, -36, -16, 6, 30, 56, 84};
  localparam coef_t ALOG_B = '{16386, 16252, 15966, 15489, 14786, 13826, 12578, 11008};

endpackage
