// Self-checking testbench of approx_mult (N = 32).
//
// Drives a new operand pair on most cycles (random gaps), changing the
// inputs just after each rising edge, and checks that
// each product appears with out_valid exactly one clock after the pair was
// taken, equal to the arithmetic model sign*(Ar*|B| + Br*|A| - Ar*Br).
// Directed cases: the waveform example a = 8, b = 0xFE000001, zeros, the
// most negative value, powers of two (where the result must be exact) and
// the rounding ties.  The mean relative error of random products is printed.
module tb_approx_mult;
  import approx_ref_pkg::*;
  localparam int N = 32;
  logic clk = 0, rst_n = 1, in_valid = 0;
  logic [N-1:0] a = '0, b = '0;
  logic out_valid;
  logic [2*N-1:0] p;
  int checks = 0, failures = 0, cycle = 0;
  longint exp_q [$];
  int     cyc_q [$];
  real err_sum = 0.0;
  int  err_n = 0;

  approx_mult #(.N(N)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // output checker, at the falling edge, while the next pair is already on
  // the inputs
  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      longint e;
      int c;
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL unexpected out_valid at cycle %0d", cycle);
      end else begin
        e = exp_q.pop_front();
        c = cyc_q.pop_front();
        if (p !== 64'(e) || cycle != c + 1) begin
          failures++;
          $display("FAIL p=%h exp=%h latency=%0d", p, e, cycle - c);
        end
      end
    end
  end

  task automatic drive(logic [N-1:0] ta, logic [N-1:0] tb_);
    @(posedge clk);
    #2;
    a = ta; b = tb_; in_valid = 1'b1;
    exp_q.push_back(ref_approx(longint'(ta), longint'(tb_), N));
    cyc_q.push_back(cycle);
  endtask

  task automatic idle();
    @(posedge clk);
    #2;
    in_valid = 1'b0;
    a = $urandom; b = $urandom;
  endtask

  initial begin
    #1 rst_n = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // waveform example: a = 8, b = -33554431 -> 8 * -33554431 exactly
    drive(32'd8, 32'b11111110000000000000000000000001);
    idle();
    checks++;
    if (ref_approx(8, longint'(32'hFE000001), N) != -64'sd268435448) failures++;
    drive('0, 32'h1234_5678);
    drive(32'h8000_0000, 32'h8000_0000);
    drive(32'h8000_0000, 32'd3);
    drive(32'hffff_ffff, 32'hffff_ffff);
    for (int i = 0; i < 31; i++) drive(32'd3 << i, 32'd5 << (i % 29));
    // a power of two operand gives the exact product
    for (int i = 0; i < 200; i++) begin
      logic [N-1:0] x;
      int s;
      x = $urandom & 32'h0000_ffff;
      s = $urandom % 15;
      drive(x, (i % 2) ? -(32'd1 << s) : (32'd1 << s));
      checks++;
      if (exp_q[$] != longint'(signed'(x)) * ((i % 2) ? -(64'sd1 << s) : (64'sd1 << s))) failures++;
    end
    for (int i = 0; i < 5000; i++) begin
      logic [N-1:0] x, y;
      x = $urandom;
      y = $urandom;
      x = N'(signed'(x) >>> ($urandom % 31));
      y = N'(signed'(y) >>> ($urandom % 31));
      if ($urandom % 8 == 0) idle();
      drive(x, y);
      if (x != 0 && y != 0) begin
        real ex;
        ex = real'(longint'(signed'(x))) * real'(longint'(signed'(y)));
        err_sum += ((real'(exp_q[$]) - ex) / ex) < 0 ? -((real'(exp_q[$]) - ex) / ex) : ((real'(exp_q[$]) - ex) / ex);
        err_n++;
      end
    end
    idle();
    idle();
    idle();
    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("FAIL %0d products never appeared", exp_q.size());
    end
    $display("mean relative error of %0d random products: %f %%", err_n, 100.0 * err_sum / err_n);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
