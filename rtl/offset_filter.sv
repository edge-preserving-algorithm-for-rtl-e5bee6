// offset_filter: 8-lane 1-D offset filter for grid noise.
//
// Input is one line of an 8x8 deblocking block, p[0..7] (p[3] | p[4] straddle
// the coding-block boundary), with its edge-protection bits e[0..7]. The
// boundary step offset = p[3] - p[4] is right-shifted (arithmetic shift, i.e.
// floor division) by 1..4 to get offset/2, /4, /8, /16. Smooth pixels
// (e = 0) move towards each other:
//   p0 - off/16, p1 - off/8, p2 - off/4, p3 - off/2 | p4 + off/2, p5 + off/4,
//   p6 + off/8, p7 + off/16,
// edge pixels (e = 1) keep their value, except the two boundary pixels, which
// are corrected by off/4 instead of off/2. Each lane ends in a multiplexer
// controlled by its edge bit. The results are clipped to 0..255 (this
// implementation's choice; the arithmetic can leave the 8-bit range only in
// lanes 0-2 and 5-7) and stored in the output register when en_x is high.
// Timing: the result of the line present in an enabled cycle with en_x high
// appears at y after that clock. Used twice: once on block rows with the Ex
// map (horizontal filter) and once on block columns with the Ey map
// (vertical filter).
module offset_filter
  import deblock_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  logic en,
  input  logic en_x,
  input  pix_t p [8],
  input  logic e [8],
  output pix_t y [8]
);
  logic signed [10:0] pv [8];
  logic signed [10:0] off, o2, o4, o8, o16;
  pix_t               f  [8];

  always_comb begin
    for (int i = 0; i < 8; i++) pv[i] = 11'(signed'({3'b0, p[i]}));
    off = pv[3] - pv[4];
    o2  = off >>> 1;
    o4  = off >>> 2;
    o8  = off >>> 3;
    o16 = off >>> 4;
    f[0] = e[0] ? p[0] : clip_pix(pv[0] - o16);
    f[1] = e[1] ? p[1] : clip_pix(pv[1] - o8);
    f[2] = e[2] ? p[2] : clip_pix(pv[2] - o4);
    f[3] = e[3] ? clip_pix(pv[3] - o4) : clip_pix(pv[3] - o2);
    f[4] = e[4] ? clip_pix(pv[4] + o4) : clip_pix(pv[4] + o2);
    f[5] = e[5] ? p[5] : clip_pix(pv[5] + o4);
    f[6] = e[6] ? p[6] : clip_pix(pv[6] + o8);
    f[7] = e[7] ? p[7] : clip_pix(pv[7] + o16);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < 8; i++) y[i] <= '0;
    end else if (en && en_x) begin
      for (int i = 0; i < 8; i++) y[i] <= f[i];
    end
  end
endmodule
