// Barrel shifter: multiply an N-bit operand by a one-hot power of two.
//
// The rounded operand pow2 is one-hot, so data * pow2 is data shifted left
// by log2(pow2).  An encoder turns pow2 into the shift amount shamt
// ($clog2(N) bits), and a logarithmic shifter of $clog2(N) mux stages shifts
// the zero-extended operand; stage k shifts by 2^k when shamt[k] is set.
// The output is 2N bits wide, so no product bit is lost.  When pow2 is zero
// (the rounded operand of a zero input) the product is forced to zero and
// the flag zero is raised.
//
// Three of these compute Br*A, Ar*Br and Ar*B in the multiplier.  The
// N-bit in / 2N-bit out widths follow the described design; the encoder and
// mux-stage structure are this design's.  Purely combinational.
module barrel_shifter #(
  parameter int unsigned N = 32,
  localparam int unsigned SW = (N > 1) ? $clog2(N) : 1
) (
  input  logic [N-1:0]   data,
  input  logic [N-1:0]   pow2,
  output logic [SW-1:0]  shamt,
  output logic [2*N-1:0] product,
  output logic           zero
);
  logic [2*N-1:0] stage [SW+1];

  // one-hot to binary: OR of the indices of the set bits
  always_comb begin
    shamt = '0;
    for (int i = 0; i < N; i++)
      if (pow2[i]) shamt = shamt | SW'(i);
    zero = (pow2 == '0);
  end

  always_comb begin
    stage[0] = {{N{1'b0}}, data};
    for (int k = 0; k < SW; k++)
      stage[k+1] = shamt[k] ? (stage[k] << (1 << k)) : stage[k];
    product = zero ? '0 : stage[SW];
  end
endmodule
