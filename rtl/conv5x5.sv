// 5x5 FIR window filter built on the approximate multiplier.
//
// For one 5x5 window of pixels X (win[m][n] = X(i+m-2, j+n-2), m = row) it
// computes
//   SMOOTH : Y = round( sum X*Mask_smooth / 60 )
//   SHARPEN: Y = 2*X(i,j) - round( sum X*Mask_gauss / 273 )
// with every X*Mask product taken from approx_mult (25 instances working in
// parallel) and the result clamped to 0 .. 2^PIX_W-1.  The masks come from
// approx_pkg.  Pixels enter the multipliers as non-negative MUL_N-bit
// operands and the coefficients as the second operand.
//
// Timing: fully pipelined, one window per clock, latency 3 clocks:
//   1) register stage inside the multipliers (barrel-shifter cutset)
//   2) adder-tree register (sum of the 25 products, centre pixel, mode)
//   3) output register (normalise, subtract for sharpening, clamp)
// out_valid follows in_valid by 3 cycles.  rst_n is asynchronous, active
// low, and clears only the valid bits.
//
// The filter equations and masks follow the described application.  The
// pipeline, the rounding of the divisions, the clamping and MUL_N are this
// design's choices.
module conv5x5
  import approx_pkg::*;
#(
  parameter int unsigned PIX_W = 8,
  parameter int unsigned MUL_N = 16
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          in_valid,
  input  filter_mode_t                  mode,
  input  logic [4:0][4:0][PIX_W-1:0]    win,
  output logic                          out_valid,
  output logic [PIX_W-1:0]              pix_out
);
  localparam int unsigned PW    = 2 * MUL_N;
  localparam int unsigned SUM_W = PW + 5;
  localparam int          PMAX  = (1 << PIX_W) - 1;

  logic [24:0]            mv;
  logic signed [PW-1:0]   prod [25];

  filter_mode_t           mode_1, mode_2;
  logic [PIX_W-1:0]       ctr_1, ctr_2;
  logic signed [SUM_W-1:0] sum_c, sum_2;
  logic                   v_2, v_3;
  logic [PIX_W-1:0]       pix_3;

  for (genvar m = 0; m < 5; m++) begin : g_row
    for (genvar n = 0; n < 5; n++) begin : g_col
      logic [PW-1:0] p_raw;
      approx_mult #(.N(MUL_N)) u_mul (
        .clk      (clk),
        .rst_n    (rst_n),
        .in_valid (in_valid),
        .a        (MUL_N'(win[m][n])),
        .b        (MUL_N'(mask_coef(mode, m, n))),
        .out_valid(mv[m*5+n]),
        .p        (p_raw)
      );
      assign prod[m*5+n] = signed'(p_raw);
    end
  end

  // centre pixel and mode travel alongside the multiplier register
  always_ff @(posedge clk) begin
    if (in_valid) begin
      ctr_1  <= win[2][2];
      mode_1 <= mode;
    end
  end

  always_comb begin
    sum_c = '0;
    for (int k = 0; k < 25; k++) sum_c = sum_c + SUM_W'(prod[k]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v_2 <= 1'b0;
    else        v_2 <= mv[12];
  end

  always_ff @(posedge clk) begin
    if (mv[12]) begin
      sum_2  <= sum_c;
      ctr_2  <= ctr_1;
      mode_2 <= mode_1;
    end
  end

  // normalisation, sharpening and clamping
  logic signed [SUM_W+1:0] blur, y;
  always_comb begin
    logic signed [SUM_W+1:0] s;
    s = (sum_2 < 0) ? '0 : (SUM_W+2)'(sum_2);
    if (mode_2 == SHARPEN) begin
      blur = (s + (SUM_W+2)'(SHARP_DIV / 2)) / (SUM_W+2)'(SHARP_DIV);
      y    = (SUM_W+2)'(2 * ctr_2) - blur;
    end else begin
      blur = (s + (SUM_W+2)'(SMOOTH_DIV / 2)) / (SUM_W+2)'(SMOOTH_DIV);
      y    = blur;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v_3 <= 1'b0;
    else        v_3 <= v_2;
  end

  always_ff @(posedge clk) begin
    if (v_2) begin
      if (y < 0)                      pix_3 <= '0;
      else if (y > (SUM_W+2)'(PMAX))  pix_3 <= PIX_W'(PMAX);
      else                            pix_3 <= PIX_W'(y);
    end
  end

  assign out_valid = v_3;
  assign pix_out   = pix_3;
endmodule
