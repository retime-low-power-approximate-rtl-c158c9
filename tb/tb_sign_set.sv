// Self-checking testbench of sign_set (W = 64): y must be mag or -mag.
module tb_sign_set;
  localparam int W = 64;
  logic [W-1:0] mag, y;
  logic neg;
  int checks = 0, failures = 0;

  sign_set #(.W(W)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      mag = (i == 0) ? '0 : {$urandom, $urandom} >> ($urandom % 64);
      neg = 1'(i);
      #1;
      checks++;
      if (y !== (neg ? 64'(-longint'(mag)) : mag)) begin
        failures++;
        $display("FAIL mag=%h neg=%b y=%h", mag, neg, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
