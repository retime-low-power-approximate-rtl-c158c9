// Sign-set stage: gives the unsigned product magnitude its sign.
//
// y = neg ? -mag : mag, in W-bit two's complement (invert and add one).
// The product sign comes from the sign detector at the multiplier input.
// Purely combinational; the negation circuit is this design's.
module sign_set #(
  parameter int unsigned W = 64
) (
  input  logic [W-1:0] mag,
  input  logic         neg,
  output logic [W-1:0] y
);
  always_comb y = neg ? (~mag + W'(1)) : mag;
endmodule
