// Self-checking testbench of sign_detector (N = 32): corner values and
// random operands; magnitudes and product sign compared with arithmetic.
module tb_sign_detector;
  localparam int N = 32;
  logic [N-1:0] a, b, a_abs, b_abs;
  logic neg;
  int checks = 0, failures = 0;

  sign_detector #(.N(N)) dut (.*);

  task automatic check(logic [N-1:0] ta, logic [N-1:0] tb_);
    longint sa, sb;
    longint unsigned ea, eb;
    a = ta; b = tb_;
    #1;
    sa = longint'(signed'(ta));
    sb = longint'(signed'(tb_));
    ea = (sa < 0) ? -sa : sa;
    eb = (sb < 0) ? -sb : sb;
    checks++;
    if (a_abs !== N'(ea) || b_abs !== N'(eb) || neg !== ((sa < 0) != (sb < 0))) begin
      failures++;
      $display("FAIL a=%h b=%h abs=%h %h neg=%b", ta, tb_, a_abs, b_abs, neg);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check('0, '0);
    check(32'h8000_0000, 32'h7fff_ffff);
    check(32'hffff_ffff, 32'h0000_0001);
    check(32'd8, 32'b11111110000000000000000000000001);
    for (int i = 0; i < 2000; i++) check($urandom, $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
