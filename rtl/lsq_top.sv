// lsq_top: approximate square and square root of an unsigned integer without
// multiplier or divider.
//
// The operand A is converted to its base-2 logarithm (log_conv: leading-one
// detector plus an eight-segment shift-and-add approximation of log2(1+f)),
// the logarithm is doubled for the square or halved for the square root
// (log_shift, a one-position shift), and the result is converted back
// (antilog_conv: eight-segment approximation of 2^f, then a shift by the
// characteristic).
//
// Interface: a (N bits, unsigned) and mode (MODE_SQUARE / MODE_SQRT) in; y out,
// unsigned fixed point with 2N integer and FW fraction bits, i.e. the value is
// y / 2^FW. For A = 0 the result is 0. The unit is purely combinational: y is
// valid one propagation delay after a or mode change, with no clock or
// handshake; a system that needs registers places them around it.
//
// The three-stage structure, the coefficient tables and the 12-bit fraction
// of the logarithm follow the published design (N = 32 is its main size, 16 its
// second). The output format and the treatment of A = 0 are this design's
// choices.
module lsq_top
  import lsq_pkg::*;
#(
  parameter int unsigned N  = 32,   // operand width
  parameter int unsigned FW = 12    // fraction bits of logarithm and result
) (
  input  logic [N-1:0]      a,
  input  mode_e             mode,
  output logic [2*N+FW-1:0] y
);
  localparam int unsigned KW = (N > 1) ? $clog2(N) : 1;

  logic [KW-1:0] lg_k;
  logic [FW-1:0] lg_f;
  logic          nz;
  logic [KW:0]   sh_k;
  logic [FW-1:0] sh_f;

  log_conv #(.N(N), .FW(FW), .KW(KW)) u_log (
    .x(a), .lg_k(lg_k), .lg_f(lg_f), .nz(nz)
  );

  log_shift #(.KW(KW), .FW(FW)) u_shift (
    .mode(mode), .k(lg_k), .f(lg_f), .k2(sh_k), .f2(sh_f)
  );

  antilog_conv #(.N(N), .FW(FW), .KW2(KW + 1), .OW(2 * N + FW)) u_alog (
    .k(sh_k), .f(sh_f), .nz(nz), .y(y)
  );
endmodule
