// log_conv: binary-to-logarithm converter.
//
// Writes the unsigned operand x as 2^k * (1+f) and outputs k + log2(1+f) as a
// fixed-point number with KW integer and FW fraction bits ({lg_k, lg_f}).
// The leading-one detector gives k; the operand is then shifted left by N-1-k so
// that the bits after the leading one line up at the top, and the first FW of
// them form f (further bits are dropped, missing ones are zero). log_frac
// replaces f by its eight-segment approximation of log2(1+f), and k is
// concatenated in front of it. nz is low for x = 0, whose logarithm does not
// exist; lg_k and lg_f are then 0 and must be ignored. Purely combinational.
//
// Structure (LOD, fraction extraction, sum-of-shifts block, concatenation)
// follows the published converter; zero handling is this design's choice.
module log_conv #(
  parameter int unsigned N  = 32,                       // operand width
  parameter int unsigned FW = 12,                       // fraction bits of the logarithm
  parameter int unsigned KW = (N > 1) ? $clog2(N) : 1   // integer bits of the logarithm
) (
  input  logic [N-1:0]  x,
  output logic [KW-1:0] lg_k,   // characteristic (position of the leading one)
  output logic [FW-1:0] lg_f,   // ~log2(1+f)
  output logic          nz      // x != 0
);
  logic [KW-1:0]     k;
  logic [N-1:0]      norm;
  logic [N+FW-2:0]   ext;
  logic [FW-1:0]     f;

  lod #(.N(N), .KW(KW)) u_lod (.x(x), .k(k), .nz(nz));

  always_comb begin
    norm = x << ((N - 1) - 32'(k));          // leading one moved to bit N-1
    ext  = {norm[N-2:0], {FW{1'b0}}};   // bits after it, zero padded
    f    = ext[N+FW-2 -: FW];
  end

  log_frac #(.FW(FW)) u_frac (.f(f), .y(lg_f));

  assign lg_k = k;
endmodule
