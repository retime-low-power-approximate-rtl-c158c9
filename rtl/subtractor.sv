// Subtractor: diff = a - b (mod 2^W).
//
// In the approximate multiplier it removes Ar*Br from Br*A + Ar*B, leaving
// the magnitude of the approximate product.  It is built as a Kogge-Stone
// adder fed with the inverted subtrahend and a carry-in of one, so it has the
// same logarithmic depth as the adder in front of it; that construction is
// this design's choice.  Purely combinational.
module subtractor #(
  parameter int unsigned W = 64
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] diff
);
  logic unused_cout;

  kogge_stone_adder #(.W(W)) u_add (
    .a   (a),
    .b   (~b),
    .cin (1'b1),
    .sum (diff),
    .cout(unused_cout)
  );
endmodule
