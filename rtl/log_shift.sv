// log_shift: the arithmetic of the logarithm domain for square and square root.
//
// log2(A^2) = 2*log2(A) and log2(sqrt(A)) = log2(A)/2, so the only operation
// needed is a one-position shift of the fixed-point logarithm {k, f}
// (KW integer bits, FW fraction bits):
//   MODE_SQUARE: {k2, f2} = {k, f} shifted one place towards the MSB; the top
//                fraction bit moves into the characteristic, which therefore
//                has one more bit (KW+1).
//   MODE_SQRT:   {k2, f2} = {k, f} shifted one place towards the LSB; the LSB of
//                k becomes the top fraction bit and the fraction LSB is dropped.
// No adder or multiplier is involved: this block is a 2:1 multiplexer of two
// wirings. Purely combinational.
module log_shift
  import lsq_pkg::*;
#(
  parameter int unsigned KW = 5,   // integer bits of the input logarithm
  parameter int unsigned FW = 12   // fraction bits
) (
  input  mode_e         mode,
  input  logic [KW-1:0] k,
  input  logic [FW-1:0] f,
  output logic [KW:0]   k2,
  output logic [FW-1:0] f2
);
  always_comb begin
    if (mode == MODE_SQUARE) begin
      {k2, f2} = {k, f, 1'b0};
    end else begin
      {k2, f2} = {2'b00, k, f[FW-1:1]};
    end
  end
endmodule
