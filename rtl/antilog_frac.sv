// antilog_frac: eight-segment uniform piecewise-linear approximation of 2^f.
//
// f in [0,1) is the fraction of a logarithm. The three top bits of f pick one of
// eight equal segments; each segment is a shift-and-add line (pwl_seg) with the
// published antilogarithm coefficients (slopes 1-71/256 ... 1+84/256, offsets
// 16386 ... 11008 in units of 2^-14). All eight lines are evaluated in parallel
// and the selected one is output as a 1.FW fixed-point value in [1,2),
// truncated. Purely combinational. Relative error against 2^f lies between
// -0.0067 % and +0.0975 %, plus the 2^-FW truncation.
module antilog_frac
  import lsq_pkg::*;
#(
  parameter int unsigned FW = 12  // fraction bits of f and of the mantissa
) (
  input  logic [FW-1:0] f,   // fraction in [0,1)
  output logic [FW:0]   m    // ~2^f as 1.FW, m[FW] = 1
);
  logic [FW:0] cand [NSEG];

  for (genvar s = 0; s < NSEG; s++) begin : g_seg
    pwl_seg #(.FW(FW), .C(ALOG_C[s]), .B(ALOG_B[s])) u_seg (.f(f), .y(cand[s]));
  end

  always_comb m = cand[f[FW-1 -: SEG_W]];

  // The line approximation stays within [1,2) on the whole interval.
  always_comb assert (m[FW] == 1'b1);
endmodule
