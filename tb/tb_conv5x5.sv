// Self-checking testbench of conv5x5 (PIX_W = 8, MUL_N = 16).
//
// Feeds random windows (smooth, noisy, saturated and edge patterns) with a
// random mode per window and random idle cycles, and checks that every
// result appears exactly 3 clocks later and equals the reference filter
// built on the arithmetic model of the approximate multiplier.  Counts how
// often each mode was used and how often the output clamped at 0 and 255.
module tb_conv5x5;
  import approx_pkg::*;
  import approx_ref_pkg::*;
  logic clk = 0, rst_n = 1, in_valid = 0;
  filter_mode_t mode = SHARPEN;
  logic [4:0][4:0][7:0] win = '0;
  logic out_valid;
  logic [7:0] pix_out;
  int checks = 0, failures = 0, cycle = 0;
  int exp_q [$];
  int cyc_q [$];
  int n_sharp = 0, n_smooth = 0, n_clamp_lo = 0, n_clamp_hi = 0;

  conv5x5 #(.PIX_W(8), .MUL_N(16)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    #1;
    if (rst_n && out_valid) begin
      int e, c;
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL unexpected output");
      end else begin
        e = exp_q.pop_front();
        c = cyc_q.pop_front();
        if (int'(pix_out) != e || cycle != c + 3) begin
          failures++;
          $display("FAIL pix=%0d exp=%0d latency=%0d", pix_out, e, cycle - c);
        end
      end
    end
  end

  initial begin
    #1 rst_n = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      int w [5][5];
      int kind, base;
      bit md;
      kind = i % 4;
      base = $urandom % 256;
      for (int m = 0; m < 5; m++)
        for (int n = 0; n < 5; n++) begin
          case (kind)
            0: w[m][n] = $urandom % 256;
            1: begin
              w[m][n] = base + $urandom % 9;
              if (w[m][n] > 255) w[m][n] = 255;
            end
            2: w[m][n] = (m == 2 && n == 2) ? ((i % 8 < 4) ? 255 : 0) : ((i % 8 < 4) ? 0 : 255);
            default: w[m][n] = (n < 2) ? 20 : 235;
          endcase
        end
      @(negedge clk);
      if ($urandom % 6 == 0) begin
        in_valid = 1'b0;
        @(negedge clk);
      end
      md = 1'($urandom);
      mode = filter_mode_t'(md);
      in_valid = 1'b1;
      for (int m = 0; m < 5; m++)
        for (int n = 0; n < 5; n++) win[m][n] = 8'(w[m][n]);
      exp_q.push_back(ref_pixel(md, w, 16));
      cyc_q.push_back(cycle);
      if (md) n_smooth++; else n_sharp++;
      if (exp_q[$] == 0) n_clamp_lo++;
      if (exp_q[$] == 255) n_clamp_hi++;
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (5) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) failures++;
    $display("windows: sharpen %0d smooth %0d, clamped low %0d high %0d",
             n_sharp, n_smooth, n_clamp_lo, n_clamp_hi);
    checks++;
    if (n_sharp == 0 || n_smooth == 0 || n_clamp_lo == 0 || n_clamp_hi == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
