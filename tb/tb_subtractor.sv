// Self-checking testbench of subtractor (W = 64): random and borrow-heavy
// operands against the - operator.
module tb_subtractor;
  localparam int W = 64;
  logic [W-1:0] a, b, diff;
  int checks = 0, failures = 0;

  subtractor #(.W(W)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3000; i++) begin
      if (i < 64) begin
        a = 64'd1 << i;
        b = 64'd1;
      end else begin
        a = {$urandom, $urandom};
        b = {$urandom, $urandom} >> ($urandom % 64);
      end
      #1;
      checks++;
      if (diff !== a - b) begin
        failures++;
        $display("FAIL %h - %h = %h", a, b, diff);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
