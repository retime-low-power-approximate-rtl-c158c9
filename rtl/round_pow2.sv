// Rounding block: nearest power of two of an unsigned magnitude.
//
// The output xr is one-hot (or all zero for x = 0) and marks the power of two
// closest to x.  Bit i of xr is set in two cases:
//   * x[i] is the leading one and x[i-1] is 0        -> round down to 2^i
//   * the leading one is x[i-1] and x[i-2] is also 1 -> round up to 2^i
// So a value exactly half-way, 3*2^(p-2), rounds up to 2^p, except the value
// 3, which rounds down to 2 (bit 2 has no round-up term).  Bits 1 and 0 are
// set only by a leading one in that position.  For the top bit the round-up
// term would need a bit N, so a magnitude of 3*2^(N-2) or more rounds to 0;
// signed operands never reach it (their largest magnitude is 2^(N-1)).
//
// The logic equations are the described rounding rule written directly;
// the "no higher bit set" term is built as a prefix OR from the MSB down.
// Purely combinational.
module round_pow2 #(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0] x,
  output logic [N-1:0] xr
);
  // above[i]: some bit j > i of x is set
  logic [N-1:0] above;

  always_comb begin
    above[N-1] = 1'b0;
    for (int i = N - 2; i >= 0; i--) above[i] = above[i+1] | x[i+1];

    for (int i = 0; i < N; i++) begin
      if (i >= 3)
        xr[i] = ~above[i] & ((~x[i] & x[i-1] & x[i-2]) | (x[i] & ~x[i-1]));
      else if (i == 2)
        xr[i] = ~above[i] & x[i] & ~x[i-1];
      else
        xr[i] = ~above[i] & x[i];
    end
  end
endmodule
