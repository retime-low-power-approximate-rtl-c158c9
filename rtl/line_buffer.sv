// Line buffer: the "signal delay" of the two-dimensional FIR filter.
//
// Four row memories, each IMG_W pixels, are chained so that, for the pixel
// being written at column col, col_out[0] is that pixel and col_out[k] is the
// pixel of the same column k rows earlier (k = 1..4).  When en is high the
// new pixel is written into row memory 0 and each row memory passes its old
// entry at col on to the next one, so the four memories always hold the
// last four complete rows.
//
// Interface: col is the column of pix_in (0 .. IMG_W-1), supplied by the
// caller's raster counter.  col_out is combinational from the memories and
// pix_in; the memories are written on the rising edge of clk.  Contents are
// not reset: the caller ignores columns until four rows have been written.
// This structure is this design's; only the need for row delays follows
// from the filter being a 5x5 FIR.
module line_buffer #(
  parameter int unsigned IMG_W = 512,
  parameter int unsigned PIX_W = 8,
  localparam int unsigned CW = (IMG_W > 1) ? $clog2(IMG_W) : 1
) (
  input  logic                   clk,
  input  logic                   en,
  input  logic [CW-1:0]          col,
  input  logic [PIX_W-1:0]       pix_in,
  output logic [4:0][PIX_W-1:0]  col_out
);
  logic [PIX_W-1:0] row_mem [4][IMG_W];

  always_comb begin
    col_out[0] = pix_in;
    for (int k = 1; k < 5; k++) col_out[k] = row_mem[k-1][col];
  end

  always_ff @(posedge clk) begin
    if (en) begin
      row_mem[0][col] <= pix_in;
      for (int k = 1; k < 4; k++) row_mem[k][col] <= row_mem[k-1][col];
    end
  end
endmodule
