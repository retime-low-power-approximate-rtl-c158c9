// Retimed rounding-based approximate multiplier (signed, N x N -> 2N bits).
//
// Idea: with Ar and Br the operands rounded to their nearest powers of two,
//     A*B = (Ar-A)*(Br-B) + Ar*B + Br*A - Ar*Br.
// The first term is small (both factors are at most about a third of the
// operands) and is dropped, leaving
//     A*B ~= Ar*B + Br*A - Ar*Br,
// three shifts, one addition and one subtraction, no partial-product array.
// The approximation is exact whenever either operand is a power of two.
//
// Datapath (one clock of latency):
//   sign_detector  -> |A|, |B|, product sign
//   round_pow2 x2  -> Ar, Br (one-hot)
//   barrel_shifter x3 -> Br*|A|, Ar*Br, Ar*|B|   (2N bits each)
//   ---- retime_reg: the single register stage sits on this cutset ----
//   kogge_stone_adder -> Br*|A| + Ar*|B|
//   subtractor        -> ... - Ar*Br = |approximate product|
//   sign_set          -> signed product p
// The sign bit and a valid bit are registered on the same cutset so that
// they stay aligned with the products.
//
// Interface: in_valid/a/b are sampled on the rising edge of clk; the
// product of that pair appears on p with out_valid one cycle later (p is
// the combinational result of the registered shifter outputs).  A new pair
// can be given every cycle.  rst_n is an asynchronous active-low reset.
//
// The equation, rounding rule, block order and register placement follow
// the described design; the valid bit, the reset and the registered sign
// bit are this design's.
module approx_mult #(
  parameter int unsigned N = 32
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid,
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic           out_valid,
  output logic [2*N-1:0] p
);
  localparam int unsigned W  = 2 * N;
  localparam int unsigned SW = (N > 1) ? $clog2(N) : 1;

  logic [N-1:0] a_abs, b_abs, ar, br;
  logic         neg;
  logic [W-1:0] brxa, brxar, arxb;
  logic [W-1:0] brxa_q, brxar_q, arxb_q;
  logic         neg_q, valid_q;
  logic [W-1:0] sum_ab, mag;
  logic         unused_cout;
  logic [SW-1:0] s_br, s_br2, s_ar;
  logic         z_br, z_br2, z_ar;

  sign_detector #(.N(N)) u_sign (
    .a(a), .b(b), .a_abs(a_abs), .b_abs(b_abs), .neg(neg)
  );

  round_pow2 #(.N(N)) u_round_a (.x(a_abs), .xr(ar));
  round_pow2 #(.N(N)) u_round_b (.x(b_abs), .xr(br));

  barrel_shifter #(.N(N)) u_sh_brxa (
    .data(a_abs), .pow2(br), .shamt(s_br), .product(brxa), .zero(z_br)
  );
  barrel_shifter #(.N(N)) u_sh_brxar (
    .data(ar), .pow2(br), .shamt(s_br2), .product(brxar), .zero(z_br2)
  );
  barrel_shifter #(.N(N)) u_sh_arxb (
    .data(b_abs), .pow2(ar), .shamt(s_ar), .product(arxb), .zero(z_ar)
  );

  retime_reg #(.W(W)) u_ff_brxa  (.clk(clk), .rst_n(rst_n), .en(in_valid), .d(brxa),  .q(brxa_q));
  retime_reg #(.W(W)) u_ff_arxb  (.clk(clk), .rst_n(rst_n), .en(in_valid), .d(arxb),  .q(arxb_q));
  retime_reg #(.W(W)) u_ff_brxar (.clk(clk), .rst_n(rst_n), .en(in_valid), .d(brxar), .q(brxar_q));
  retime_reg #(.W(1)) u_ff_sign  (.clk(clk), .rst_n(rst_n), .en(in_valid), .d(neg),   .q(neg_q));
  retime_reg #(.W(1)) u_ff_valid (.clk(clk), .rst_n(rst_n), .en(1'b1),     .d(in_valid), .q(valid_q));

  kogge_stone_adder #(.W(W)) u_add (
    .a(brxa_q), .b(arxb_q), .cin(1'b0), .sum(sum_ab), .cout(unused_cout)
  );

  subtractor #(.W(W)) u_sub (.a(sum_ab), .b(brxar_q), .diff(mag));

  sign_set #(.W(W)) u_sign_set (.mag(mag), .neg(neg_q), .y(p));

  assign out_valid = valid_q;
endmodule
