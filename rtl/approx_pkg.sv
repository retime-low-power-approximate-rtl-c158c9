// Shared types and constants of the approximate image filter.
//
// filter_mode_t selects the 5x5 mask.  SHARPEN uses the 5x5 Gaussian
// (weights summing to 273) and computes Y = 2*X - blur; SMOOTH uses the
// centre-weighted mask whose weights sum to 60 and computes Y = blur.
// mask_coef(mode, m, n) gives the coefficient at row m, column n (0..4).
package approx_pkg;

  typedef enum logic {
    SHARPEN = 1'b0,
    SMOOTH  = 1'b1
  } filter_mode_t;

  localparam int unsigned SHARP_DIV = 273;
  localparam int unsigned SMOOTH_DIV = 60;

  function automatic logic [6:0] mask_coef(filter_mode_t mode, int m, int n);
    // distance class of (m, n) from the centre, symmetric in both axes
    int dm, dn, lo, hi;
    dm = (m > 2) ? m - 2 : 2 - m;
    dn = (n > 2) ? n - 2 : 2 - n;
    lo = (dm < dn) ? dm : dn;
    hi = (dm < dn) ? dn : dm;
    if (mode == SHARPEN) begin
      // Gaussian: rows 1 4 7 4 1 / 4 16 26 16 4 / 7 26 41 26 7
      case ({lo[1:0], hi[1:0]})
        4'b00_00: return 7'd41;
        4'b00_01: return 7'd26;
        4'b00_10: return 7'd7;
        4'b01_01: return 7'd16;
        4'b01_10: return 7'd4;
        default:  return 7'd1;   // (2,2) corners
      endcase
    end else begin
      // centre 12, inner ring 4, outer ring 1
      if (hi == 0)      return 7'd12;
      else if (hi == 1) return 7'd4;
      else              return 7'd1;
    end
  endfunction

endpackage
