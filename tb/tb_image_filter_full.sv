// Full-size testbench of image_filter at its default parameters
// (512 x 512 pixels, 8-bit pixels, 16-bit multipliers).
//
// Streams one synthetic 512 x 512 test picture twice, first sharpened, then
// smoothed, one pixel per clock.  The picture has a smooth diagonal ramp, a
// bright disc with a sharp rim, a dark rectangle and mild noise, so both
// flat areas and edges are present.  Every output pixel is checked against
// the reference filter built on the arithmetic model of the approximate
// multiplier, the output count per frame must be 508 x 508, and the first
// output must come 4 clocks after the pixel that completes its window.
// The PSNR of each approximate output frame against the same filter with
// exact products is printed; it is required to stay above 30 dB.
module tb_image_filter_full;
  import approx_pkg::*;
  import approx_ref_pkg::*;
  localparam int W = 512;
  localparam int H = 512;
  logic clk = 0, rst_n = 1, in_valid = 0, sof = 0;
  filter_mode_t mode = SHARPEN;
  logic [7:0] pix_in = '0;
  logic out_valid;
  logic [7:0] pix_out;
  int checks = 0, failures = 0, cycle = 0, n_out = 0;
  int exp_q [$];
  int exact_q [$];
  int cyc_q [$];
  int img [H][W];
  real sq_err = 0.0;
  int first_lat = -1;

  image_filter dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (2 * W * H + 10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    #1;
    if (rst_n && out_valid) begin
      int e, x, c;
      checks++;
      n_out++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL unexpected output at cycle %0d", cycle);
      end else begin
        e = exp_q.pop_front();
        x = exact_q.pop_front();
        c = cyc_q.pop_front();
        if (first_lat < 0) first_lat = cycle - c;
        sq_err += real'((int'(pix_out) - x) * (int'(pix_out) - x));
        if (int'(pix_out) != e || cycle != c + 4) begin
          failures++;
          if (failures < 10) $display("FAIL pix=%0d exp=%0d latency=%0d", pix_out, e, cycle - c);
        end
      end
    end
  end

  task automatic send_frame(bit md);
    for (int r = 0; r < H; r++) begin
      for (int c = 0; c < W; c++) begin
        @(negedge clk);
        in_valid = 1'b1;
        sof = (r == 0 && c == 0);
        mode = filter_mode_t'(md);
        pix_in = 8'(img[r][c]);
        if (r >= 4 && c >= 4) begin
          int w [5][5];
          for (int m = 0; m < 5; m++)
            for (int n = 0; n < 5; n++) w[m][n] = img[r - 4 + m][c - 4 + n];
          exp_q.push_back(ref_pixel(md, w, 16));
          exact_q.push_back(exact_pixel(md, w));
          cyc_q.push_back(cycle);
        end
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
    sof = 1'b0;
    repeat (8) @(negedge clk);
  endtask

  function automatic real psnr(real se, int n);
    real mse;
    mse = se / n;
    if (mse == 0.0) return 99.0;
    return 10.0 * $log10(255.0 * 255.0 / mse);
  endfunction

  initial begin
    real p;
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) begin
        int v, dr, dc;
        v  = 40 + (r + c) / 6;
        dr = r - 230;
        dc = c - 300;
        if (dr * dr + dc * dc < 120 * 120) v += 70;
        if (r > 340 && r < 460 && c > 60 && c < 200) v -= 35;
        v += $urandom % 12;
        img[r][c] = (v > 255) ? 255 : ((v < 0) ? 0 : v);
      end
    #1 rst_n = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;

    send_frame(1'b0);
    checks++;
    if (n_out != (W - 4) * (H - 4)) failures++;
    p = psnr(sq_err, n_out);
    $display("sharpen: %0d pixels, PSNR against exact products %0.1f dB", n_out, p);
    checks++;
    if (p < 30.0) failures++;

    n_out = 0;
    sq_err = 0.0;
    send_frame(1'b1);
    checks++;
    if (n_out != (W - 4) * (H - 4)) failures++;
    p = psnr(sq_err, n_out);
    $display("smooth:  %0d pixels, PSNR against exact products %0.1f dB", n_out, p);
    checks++;
    if (p < 30.0) failures++;
    checks++;
    if (first_lat != 4) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
