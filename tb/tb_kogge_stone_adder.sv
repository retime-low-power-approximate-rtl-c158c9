// Self-checking testbench of kogge_stone_adder (W = 64): random operands,
// long carry chains and carry-in, against the + operator on 65 bits.
module tb_kogge_stone_adder;
  localparam int W = 64;
  logic [W-1:0] a, b, sum;
  logic cin, cout;
  int checks = 0, failures = 0;

  kogge_stone_adder #(.W(W)) dut (.*);

  task automatic check(logic [W-1:0] ta, logic [W-1:0] tb_, logic tc);
    logic [W:0] e;
    a = ta; b = tb_; cin = tc;
    #1;
    e = {1'b0, ta} + {1'b0, tb_} + (W+1)'(tc);
    checks++;
    if ({cout, sum} !== e) begin
      failures++;
      $display("FAIL %h + %h + %b = %b_%h exp %h", ta, tb_, tc, cout, sum, e);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check('1, '0, 1'b1);
    check('1, 64'd1, 1'b0);
    check(64'h7fff_ffff_ffff_ffff, 64'd1, 1'b0);
    for (int i = 0; i < 64; i++) check(64'd1 << i, (64'd1 << i) - 1, 1'b1);
    for (int i = 0; i < 3000; i++) check({$urandom, $urandom}, {$urandom, $urandom}, 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
