// Streaming image sharpening / smoothing filter using the retimed
// rounding-based approximate multiplier.
//
// Pixels of an IMG_W x IMG_H grey image arrive one per clock in raster
// order (in_valid, with sof marking the first pixel of a frame).  A raster
// counter gives each pixel its row and column; a line_buffer supplies the
// same column of the four previous rows, and a 5x5 window register shifts in
// one such column per pixel.  Once the window lies fully inside the image
// (row >= 4 and column >= 4) it is passed to conv5x5, which applies the
// selected 5x5 mask with 25 approximate multipliers.
//
// Output: one filtered pixel for each window position fully inside the
// image, i.e. (IMG_W-4) x (IMG_H-4) pixels per frame in raster order, the
// pixel at output (r, c) being the filtered input pixel (r+2, c+2).
// out_valid/pix_out follow the input pixel that completes the window by 4
// clocks (1 window register + 3 in conv5x5).  Border pixels are not
// produced.
//
// Mode: mode is sampled with the sof pixel and held for the whole frame, so
// sharpening and smoothing can be switched between frames.
//
// The two filters and the use of the approximate multiplier follow the
// described application; streaming, border handling and per-frame mode
// selection are this design's.  rst_n is asynchronous, active low.
module image_filter
  import approx_pkg::*;
#(
  parameter int unsigned IMG_W = 512,
  parameter int unsigned IMG_H = 512,
  parameter int unsigned PIX_W = 8,
  parameter int unsigned MUL_N = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic              sof,
  input  filter_mode_t      mode,
  input  logic [PIX_W-1:0]  pix_in,
  output logic              out_valid,
  output logic [PIX_W-1:0]  pix_out
);
  localparam int unsigned CW = (IMG_W > 1) ? $clog2(IMG_W) : 1;
  localparam int unsigned RW = (IMG_H > 1) ? $clog2(IMG_H) : 1;

  logic [CW-1:0] col_q, col_c;
  logic [RW-1:0] row_q, row_c;
  filter_mode_t  mode_q, mode_c;
  logic [4:0][PIX_W-1:0] col_pix;
  logic [4:0][4:0][PIX_W-1:0] win_q;
  logic          win_valid;

  // position of the pixel now on pix_in
  always_comb begin
    col_c  = sof ? '0 : col_q;
    row_c  = sof ? '0 : row_q;
    mode_c = sof ? mode : mode_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      col_q  <= '0;
      row_q  <= '0;
      mode_q <= SHARPEN;
    end else if (in_valid) begin
      mode_q <= mode_c;
      if (col_c == CW'(IMG_W - 1)) begin
        col_q <= '0;
        row_q <= (row_c == RW'(IMG_H - 1)) ? '0 : row_c + RW'(1);
      end else begin
        col_q <= col_c + CW'(1);
        row_q <= row_c;
      end
    end
  end

  line_buffer #(.IMG_W(IMG_W), .PIX_W(PIX_W)) u_lines (
    .clk    (clk),
    .en     (in_valid),
    .col    (col_c),
    .pix_in (pix_in),
    .col_out(col_pix)
  );

  // 5x5 window: column 4 is the newest, row 4 the current image row
  always_ff @(posedge clk) begin
    if (in_valid) begin
      for (int m = 0; m < 5; m++) begin
        for (int n = 0; n < 4; n++) win_q[m][n] <= win_q[m][n+1];
        win_q[m][4] <= col_pix[4-m];
      end
    end
  end

  filter_mode_t win_mode;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      win_valid <= 1'b0;
      win_mode  <= SHARPEN;
    end else begin
      win_valid <= in_valid && (row_c >= RW'(4)) && (col_c >= CW'(4));
      if (in_valid) win_mode <= mode_c;
    end
  end

  conv5x5 #(.PIX_W(PIX_W), .MUL_N(MUL_N)) u_conv (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (win_valid),
    .mode     (win_mode),
    .win      (win_q),
    .out_valid(out_valid),
    .pix_out  (pix_out)
  );
endmodule
