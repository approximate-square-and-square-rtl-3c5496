// lod: leading-one detector.
//
// Returns the bit position k of the most significant 1 of x (the characteristic
// of the logarithm, x = 2^k * (1+f)) and a flag telling whether x is nonzero;
// k is 0 when x is 0. Written as a priority scan from the LSB upwards, which
// synthesis turns into a priority encoder; the particular tree structure of
// the leading-one detector used in the original design is not reproduced.
// Purely combinational.
module lod #(
  parameter int unsigned N  = 32,                       // operand width
  parameter int unsigned KW = (N > 1) ? $clog2(N) : 1   // width of k
) (
  input  logic [N-1:0]  x,
  output logic [KW-1:0] k,
  output logic          nz
);
  always_comb begin
    k = '0;
    for (int unsigned i = 0; i < N; i++) begin
      if (x[i]) k = KW'(i);
    end
    nz = |x;
  end
endmodule
