// log_frac: eight-segment uniform piecewise-linear approximation of log2(1+f).
//
// f in [0,1) is the fraction left after the leading one of the operand. The
// three top bits of f pick one of eight equal segments; each segment is a
// shift-and-add line (pwl_seg) with the published logarithm coefficients
// (slopes 1+92/256 ... 1-64/256, offsets 0 ... 4096/2^14). All eight lines are
// evaluated in parallel and the selected one is passed on, truncated to FW
// fraction bits. The result is always below 1, so only the fraction is output.
// Purely combinational. Absolute error against log2(1+f) is within -2.5e-3
// plus the 2^-FW truncation.
module log_frac
  import lsq_pkg::*;
#(
  parameter int unsigned FW = 12  // fraction bits in and out
) (
  input  logic [FW-1:0] f,   // fraction in [0,1)
  output logic [FW-1:0] y    // ~log2(1+f), in [0,1)
);
  logic [FW:0] cand [NSEG];

  for (genvar s = 0; s < NSEG; s++) begin : g_seg
    pwl_seg #(.FW(FW), .C(LOG_C[s]), .B(LOG_B[s])) u_seg (.f(f), .y(cand[s]));
  end

  logic [FW:0] sel;
  always_comb begin
    sel = cand[f[FW-1 -: SEG_W]];
    y   = sel[FW-1:0];
  end

  // The line approximation stays below 1 on the whole interval.
  always_comb assert (sel[FW] == 1'b0);
endmodule
