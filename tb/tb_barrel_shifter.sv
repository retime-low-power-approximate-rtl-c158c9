// Self-checking testbench of barrel_shifter (N = 32): every shift amount
// with random data, plus the zero rounded operand; product compared with a
// 64-bit multiplication, shift amount with the one-hot position.
module tb_barrel_shifter;
  localparam int N = 32;
  logic [N-1:0] data, pow2;
  logic [4:0] shamt;
  logic [2*N-1:0] product;
  logic zero;
  int checks = 0, failures = 0;

  barrel_shifter #(.N(N)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3200; i++) begin
      int s;
      s = i % 32;
      data = (i < 32) ? '1 : $urandom;
      pow2 = 32'd1 << s;
      #1;
      checks++;
      if (product !== 64'(data) * 64'(pow2) || shamt !== 5'(s) || zero) begin
        failures++;
        $display("FAIL data=%h pow2=%h product=%h shamt=%0d", data, pow2, product, shamt);
      end
    end
    data = 32'hdead_beef;
    pow2 = '0;
    #1;
    checks++;
    if (product !== '0 || !zero) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
