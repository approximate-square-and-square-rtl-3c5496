// pwl_seg: one straight-line segment of a piecewise-linear converter, built
// from shifts and adds only.
//
// Computes y = f*(1 + C/256) + B/2^14 for a fraction f in [0,1) given with FW
// bits. The slope correction C/256 is a constant, so f*|C|/256 is formed as the
// sum of f shifted right by (8-i) for every set bit i of |C|, then added to or
// subtracted from f. The sum is kept with GW = max(FW,14)+8 fractional bits, so
// every shifted copy and the offset are exact, and only the final result is
// truncated (not rounded) to FW fractional bits. The result has one integer bit:
// y[FW] is the units bit, y[FW-1:0] the fraction. Purely combinational.
//
// The segment form and the coefficient units follow the published converter
// tables (the defaults are the first logarithm segment); the internal guard width and the truncation of the result are this
// design's choices (truncation reproduces the worked example of the design).
module pwl_seg
  import lsq_pkg::*;
#(
  parameter int unsigned FW = 12,  // fraction bits of f and y
  parameter int          C  = 92,  // slope correction in units of 2^-8, |C| < 256
  parameter int unsigned B  = 0    // offset in units of 2^-14, B < 2^15
) (
  input  logic [FW-1:0] f,
  output logic [FW:0]   y
);
  localparam int unsigned GW   = ((FW > BETA_FW) ? FW : BETA_FW) + SLOPE_SH;
  localparam int unsigned AW   = GW + 2;
  localparam int unsigned CABS = (C < 0) ? -C : C;
  localparam logic [AW-1:0] BEXT = AW'(B) << (GW - BETA_FW);

  logic [AW-1:0] fe, term, acc;

  always_comb begin
    fe   = AW'(f) << (GW - FW);
    term = '0;
    for (int i = 0; i < SLOPE_SH; i++) begin
      if (CABS[i]) term = term + (fe >> (SLOPE_SH - i));
    end
    acc = ((C < 0) ? (fe - term) : (fe + term)) + BEXT;
    y   = acc[GW -: (FW + 1)];
  end

  initial begin
    assert (CABS < 256 && B < 32768)
      else $error("pwl_seg: coefficient out of range");
  end
endmodule
