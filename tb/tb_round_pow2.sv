// Self-checking testbench of round_pow2: exhaustive at N = 12 (every
// value, including the ties 3*2^k and the special case 3 -> 2) and random
// plus tie values at the default N = 32, against an arithmetic model.
module tb_round_pow2;
  import approx_ref_pkg::*;
  logic [11:0] xs, xrs;
  logic [31:0] x, xr;
  int checks = 0, failures = 0;
  int ties = 0;

  round_pow2 #(.N(12)) dut_s (.x(xs), .xr(xrs));
  round_pow2             dut   (.x(x),  .xr(xr));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // values >= 3*2^10 would round to 2^12, beyond the 12-bit output
    for (int v = 0; v < 3 * 1024; v++) begin
      xs = 12'(v);
      #1;
      checks++;
      if (64'(xrs) != ref_round(64'(v))) begin
        failures++;
        $display("FAIL N=12 x=%0d xr=%0d exp=%0d", v, xrs, ref_round(64'(v)));
      end
    end
    for (int i = 0; i < 3000; i++) begin
      logic [31:0] v;
      if (i < 30) v = 32'd3 << i;           // ties
      else if (i < 60) v = 32'd1 << (i - 30);
      else begin
        v = $urandom;
        v = v >> ($urandom % 32);
        v[31] = 1'b0;
      end
      if (i < 30 && i > 0) ties++;
      x = v;
      #1;
      checks++;
      if (64'(xr) != ref_round(64'(v))) begin
        failures++;
        $display("FAIL N=32 x=%h xr=%h exp=%h", v, xr, ref_round(64'(v)));
      end
    end
    // the most negative magnitude 2^31 stays itself
    x = 32'h8000_0000;
    #1;
    checks++;
    if (xr !== 32'h8000_0000) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
