// End-to-end testbench of image_filter on small frames (16 x 12 pixels).
//
// Streams five frames through the filter: sharpen on a noisy gradient,
// smooth on the same kind of image (mode switch), sharpen on a
// high-contrast checkerboard (output clamps at 0 and 255), a frame cut off
// after two rows by a new start of frame, and a smooth frame after it.  The
// mode input is randomised away from the sof pixel to show it is held per
// frame, and idle cycles are inserted at random inside frames.
//
// For every input pixel that completes a window fully inside the image the
// expected output is computed with the arithmetic reference filter; outputs
// must come out in order, exactly 4 clocks after that pixel, and
// (W-4) x (H-4) per complete frame.  Each mechanism (both modes, a mode
// switch, input idle cycles, clamping low and high, frame restart) is
// counted and must occur at least once.
module tb_image_filter;
  import approx_pkg::*;
  import approx_ref_pkg::*;
  localparam int W = 16;
  localparam int H = 12;
  logic clk = 0, rst_n = 1, in_valid = 0, sof = 0;
  filter_mode_t mode = SHARPEN;
  logic [7:0] pix_in = '0;
  logic out_valid;
  logic [7:0] pix_out;
  int checks = 0, failures = 0, cycle = 0, n_out = 0;
  int exp_q [$];
  int cyc_q [$];
  int img [H][W];
  int n_sharp = 0, n_smooth = 0, n_switch = 0, n_gap = 0;
  int n_clamp_lo = 0, n_clamp_hi = 0, n_restart = 0;
  bit last_mode;
  bit have_last = 0;

  image_filter #(.IMG_W(W), .IMG_H(H), .PIX_W(8), .MUL_N(16)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    #1;
    if (rst_n && out_valid) begin
      int e, c;
      checks++;
      n_out++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL unexpected output at cycle %0d", cycle);
      end else begin
        e = exp_q.pop_front();
        c = cyc_q.pop_front();
        if (int'(pix_out) != e || cycle != c + 4) begin
          failures++;
          $display("FAIL pix=%0d exp=%0d latency=%0d", pix_out, e, cycle - c);
        end
      end
    end
  end

  // kind 0: noisy gradient, kind 1: checkerboard of 4x4 blocks
  task automatic send_frame(bit md, int kind, int rows);
    if (have_last && md != last_mode) n_switch++;
    last_mode = md;
    have_last = 1;
    if (rows < H) n_restart++;
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++)
        img[r][c] = (kind == 0) ? ((r * 12 + c * 7 + $urandom % 40) % 256)
                                : ((((r / 4) + (c / 4)) % 2) ? 250 : 5);
    for (int r = 0; r < rows; r++) begin
      for (int c = 0; c < W; c++) begin
        @(negedge clk);
        if (!(r == 0 && c == 0) && $urandom % 5 == 0) begin
          in_valid = 1'b0;
          sof = 1'b0;
          n_gap++;
          @(negedge clk);
        end
        in_valid = 1'b1;
        sof = (r == 0 && c == 0);
        mode = sof ? filter_mode_t'(md) : filter_mode_t'($urandom % 2);
        pix_in = 8'(img[r][c]);
        if (r >= 4 && c >= 4) begin
          int w [5][5];
          for (int m = 0; m < 5; m++)
            for (int n = 0; n < 5; n++) w[m][n] = img[r - 4 + m][c - 4 + n];
          exp_q.push_back(ref_pixel(md, w, 16));
          cyc_q.push_back(cycle);
          if (md) n_smooth++; else n_sharp++;
          if (exp_q[$] == 0) n_clamp_lo++;
          if (exp_q[$] == 255) n_clamp_hi++;
        end
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
    sof = 1'b0;
  endtask

  initial begin
    int total;
    #1 rst_n = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    send_frame(1'b0, 0, H);
    send_frame(1'b1, 0, H);
    send_frame(1'b0, 1, H);
    send_frame(1'b0, 0, 2);
    send_frame(1'b1, 1, H);
    repeat (8) @(negedge clk);
    total = 4 * (W - 4) * (H - 4);
    checks++;
    if (n_out != total || exp_q.size() != 0) begin
      failures++;
      $display("FAIL %0d outputs, expected %0d", n_out, total);
    end
    $display("outputs %0d; sharpen %0d smooth %0d; mode switches %0d; idle cycles %0d; clamp low %0d high %0d; restarts %0d",
             n_out, n_sharp, n_smooth, n_switch, n_gap, n_clamp_lo, n_clamp_hi, n_restart);
    checks++;
    if (n_sharp == 0 || n_smooth == 0 || n_switch == 0 || n_gap == 0 ||
        n_clamp_lo == 0 || n_clamp_hi == 0 || n_restart == 0) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
