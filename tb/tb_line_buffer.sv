// Self-checking testbench of line_buffer (IMG_W = 8): streams seven rows of
// random pixels with random idle cycles and checks, for every pixel, that
// col_out[k] is the pixel of the same column k rows earlier.
module tb_line_buffer;
  localparam int W = 8;
  localparam int H = 7;
  logic clk = 0, en = 0;
  logic [2:0] col = '0;
  logic [7:0] pix_in = '0;
  logic [4:0][7:0] col_out;
  int img [H][W];
  int checks = 0, failures = 0;

  line_buffer #(.IMG_W(W), .PIX_W(8)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < H; r++) begin
      for (int c = 0; c < W; c++) begin
        @(negedge clk);
        if ($urandom % 4 == 0) begin
          en = 1'b0;
          @(negedge clk);
        end
        img[r][c] = $urandom % 256;
        en = 1'b1;
        col = 3'(c);
        pix_in = 8'(img[r][c]);
        #1;
        for (int k = 0; k <= 4 && k <= r; k++) begin
          checks++;
          if (int'(col_out[k]) != img[r-k][c]) begin
            failures++;
            $display("FAIL r=%0d c=%0d k=%0d got %0d exp %0d", r, c, k, col_out[k], img[r-k][c]);
          end
        end
      end
    end
    @(negedge clk);
    en = 1'b0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
