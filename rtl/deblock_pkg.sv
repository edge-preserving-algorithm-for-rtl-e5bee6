// deblock_pkg: types and constants shared by the deblocking filter core.
//
// Pixels are 8-bit unsigned grey levels. Blocks are indexed [row][col] with
// row 0 at the top and col 0 at the left of the image. The thresholds T = 20
// (edge strength) and Td = 10 (oriented gradients), the 8x8 deblocking block,
// the 3x3 windows and the 16-row scan stripe are the values the design is
// built around; the helper function epf_coef() gives the fixed-point
// coefficient (255 - d)^8 as the three truncating squarers compute it.
package deblock_pkg;

  localparam int PIX_W  = 8;    // pixel width
  localparam int BLK    = 8;    // deblocking block size
  localparam int STRIPE = 16;   // rows per vertical-raster stripe
  localparam int STEP   = 8;    // rows between the starts of two stripes

  typedef logic [PIX_W-1:0] pix_t;

  // Keep the 8 high bits of an 8x8-bit product (truncating squarer).
  function automatic logic [7:0] sq_hi(input logic [7:0] a);
    logic [15:0] p;
    p = a * a;
    return p[15:8];
  endfunction

  // Coefficient c = (255 - d)^8 in the 8-bit truncated representation.
  function automatic logic [7:0] epf_coef(input logic [7:0] d);
    return sq_hi(sq_hi(sq_hi(8'd255 - d)));
  endfunction

  // Clip a signed value to the 8-bit pixel range.
  function automatic pix_t clip_pix(input logic signed [10:0] v);
    if (v < 0)        return '0;
    else if (v > 255) return 8'd255;
    else              return pix_t'(v[7:0]);
  endfunction

endpackage
