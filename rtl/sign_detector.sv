// Sign detector of the rounding-based approximate multiplier.
//
// Takes two operands in two's complement and hands the rest of the datapath
// their magnitudes, so that the rounding and shifting that follow only ever
// see non-negative numbers (a negative number has no power-of-two rounding in
// two's complement).  The sign of the product is the exclusive OR of the two
// operand sign bits and is carried separately to the sign-set stage.
//
// Interface: a, b are N-bit signed inputs; a_abs, b_abs are N-bit unsigned
// magnitudes; neg is high when the product is negative.  Purely
// combinational.  The magnitude of -2^(N-1) is 2^(N-1), which still fits
// the N-bit unsigned output, so every input value is handled.
//
// Taking magnitudes first and re-applying the sign last follows the
// described architecture; the conditional-negate circuit is this design's.
module sign_detector #(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] a_abs,
  output logic [N-1:0] b_abs,
  output logic         neg
);
  always_comb begin
    a_abs = a[N-1] ? (~a + N'(1)) : a;
    b_abs = b[N-1] ? (~b + N'(1)) : b;
    neg   = a[N-1] ^ b[N-1];
  end
endmodule
