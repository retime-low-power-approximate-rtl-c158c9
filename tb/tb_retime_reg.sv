// Self-checking testbench of retime_reg (W = 64): asynchronous reset,
// load when enabled, hold when not, checked against a model register.
module tb_retime_reg;
  localparam int W = 64;
  logic clk = 0, rst_n = 1, en = 0;
  logic [W-1:0] d = '0, q, model;
  int checks = 0, failures = 0;

  retime_reg #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst_n = 0;
    #1;
    checks++;
    if (q !== '0) failures++;
    rst_n = 1;
    model = '0;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      en = 1'($urandom);
      d  = {$urandom, $urandom};
      @(posedge clk);
      if (en) model = d;
      #1;
      checks++;
      if (q !== model) begin
        failures++;
        $display("FAIL cycle %0d q=%h exp=%h", i, q, model);
      end
    end
    #2 rst_n = 0;
    #1;
    checks++;
    if (q !== '0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
