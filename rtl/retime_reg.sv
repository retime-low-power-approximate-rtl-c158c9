// Retiming register: one D flip-flop per bit on the cutset behind the
// barrel shifters of the approximate multiplier.
//
// Placing the only pipeline register right after the three shifters (rather
// than in front of or inside them) puts the flip-flops where switching
// activity is high, which is the power-saving idea of the retimed
// multiplier.  q takes d on the rising clock edge when en is high;
// rst_n (asynchronous, active low) clears it.  Reset and enable are this
// design's additions.
module retime_reg #(
  parameter int unsigned W = 64
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  q <= '0;
    else if (en) q <= d;
  end
endmodule
