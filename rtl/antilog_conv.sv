// antilog_conv: logarithm-to-binary converter.
//
// Takes a logarithm k + f (k: KW2-bit characteristic, f: FW-bit fraction) and
// returns 2^k * 2^f as an unsigned fixed-point number with FW fraction bits and
// OW-FW integer bits. antilog_frac approximates the mantissa 2^f as 1.FW; the
// mantissa is then shifted left by k. Bits below 2^-FW are never produced, so
// the result of a small k keeps the full FW-bit fraction. When nz is low (the
// operand of the unit was zero) the result is forced to zero. Purely
// combinational.
//
// The mantissa approximation and the final shift by k follow the published
// converter; the output format and the zero input are this design's choices.
module antilog_conv #(
  parameter int unsigned N   = 32,        // operand width of the unit
  parameter int unsigned FW  = 12,        // fraction bits
  parameter int unsigned KW2 = ((N > 1) ? $clog2(N) : 1) + 1,  // bits of k
  parameter int unsigned OW  = 2 * N + FW // result width, Q(2N).FW
) (
  input  logic [KW2-1:0] k,
  input  logic [FW-1:0]  f,
  input  logic           nz,
  output logic [OW-1:0]  y
);
  logic [FW:0] m;

  antilog_frac #(.FW(FW)) u_frac (.f(f), .m(m));

  always_comb y = nz ? (OW'(m) << k) : '0;
endmodule
