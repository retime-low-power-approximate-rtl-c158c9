// Kogge-Stone parallel-prefix adder, W bits wide.
//
// Bit-level generate g = a & b and propagate p = a ^ b are combined in
// $clog2(W) prefix levels; at level k every position i >= 2^k merges with
// position i - 2^k:  G = G_i | P_i & G_(i-2^k),  P = P_i & P_(i-2^k).
// After the last level G[i] is the carry out of bits i..0 (carry-in folded
// into bit 0's generate), so sum[i] = p[i] ^ carry into bit i.  The depth is
// logarithmic in W with the fan-out of 2 that characterises Kogge-Stone.
//
// Interface: sum = (a + b + cin) mod 2^W, cout the carry out.  Purely
// combinational.  The adder type is the one named for the multiplier's
// adder; the prefix network is the textbook one.
module kogge_stone_adder #(
  parameter int unsigned W = 64,
  localparam int unsigned L = (W > 1) ? $clog2(W) : 1
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  logic [W-1:0] p0;
  logic [W-1:0] gl [L+1];
  logic [W-1:0] pl [L+1];

  always_comb begin
    p0    = a ^ b;
    gl[0] = a & b;
    pl[0] = p0;
    gl[0][0] = (a[0] & b[0]) | (p0[0] & cin);
    for (int k = 0; k < L; k++) begin
      for (int i = 0; i < W; i++) begin
        if (i >= (1 << k)) begin
          gl[k+1][i] = gl[k][i] | (pl[k][i] & gl[k][i-(1<<k)]);
          pl[k+1][i] = pl[k][i] & pl[k][i-(1<<k)];
        end else begin
          gl[k+1][i] = gl[k][i];
          pl[k+1][i] = pl[k][i];
        end
      end
    end
    sum[0] = p0[0] ^ cin;
    for (int i = 1; i < W; i++) sum[i] = p0[i] ^ gl[L][i-1];
    cout = gl[L][W-1];
  end
endmodule
