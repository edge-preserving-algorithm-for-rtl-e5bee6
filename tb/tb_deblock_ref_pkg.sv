// tb_deblock_ref_pkg: bit-exact behavioural reference of the deblocking
// algorithm, written frame-wise from the equations, for the testbenches.
//
// ref_frame() takes a W x H grey image and returns what the core must write:
//  * Ex/Ey/Ez from a 3x3 Prewitt operator with thresholds TD (gradients) and
//    T (|Gx|+|Gy|) on the original image;
//  * every 8x8 deblocking block (rows 8b+4..8b+11, columns 8c+4..8c+11) is
//    offset filtered along its rows with Ex, then along its columns with Ey;
//  * stripe s (rows 8s..8s+15) owns rows 8s+4..8s+11 (plus rows 0..3 for the
//    first and the last four rows for the last stripe); an owned pixel with
//    Ez = 1 not on the frame border is replaced by the edge-preserving average
//    of its 3x3 window, in which rows of the stripe's own band are offset
//    filtered and all other rows are original.
// It also counts how often each mechanism is exercised.
package tb_deblock_ref_pkg;

  typedef struct {
    int db_blocks;       // deblocking blocks filtered
    int lanes_smooth;    // offset-filter lanes with e = 0
    int lanes_edge;      // offset-filter lanes with e = 1
    int clips;           // offset-filter results clipped to 0..255
    int epf_pixels;      // pixels replaced by the edge-preserving filter
    int pass_pixels;     // interior pixels with Ez = 0
    int border_pixels;   // frame-border pixels
  } ref_stats_t;

  function automatic int fdiv(int a, int d);   // floor division
    if (a >= 0) return a / d;
    return -((-a + d - 1) / d);
  endfunction

  function automatic int clip(int v, ref ref_stats_t st);
    if (v < 0)   begin st.clips++; return 0;   end
    if (v > 255) begin st.clips++; return 255; end
    return v;
  endfunction

  // Offset filter on one line p[0..7] with edge bits e[0..7].
  function automatic void offset_line(ref int p[8], input bit e[8], ref ref_stats_t st);
    int off, q[8];
    int sh[8] = '{16, 8, 4, 2, 2, 4, 8, 16};
    off = p[3] - p[4];
    for (int i = 0; i < 8; i++) begin
      int d, sgn;
      sgn = (i < 4) ? -1 : 1;
      if (e[i]) st.lanes_edge++; else st.lanes_smooth++;
      if (i == 3 || i == 4) d = e[i] ? 4 : 2;
      else d = sh[i];
      if (e[i] && !(i == 3 || i == 4)) q[i] = p[i];
      else q[i] = clip(p[i] + sgn * fdiv(off, d), st);
    end
    p = q;
  endfunction

  function automatic int sqh(int a);
    return (a * a) / 256;
  endfunction

  function automatic int epf(int x[9]);
    int a, b;
    a = 0; b = 0;
    for (int i = 0; i < 9; i++) begin
      int d, t, c;
      d = (x[i] > x[4]) ? x[i] - x[4] : x[4] - x[i];
      t = 255 - d;
      c = sqh(sqh(sqh(t)));
      a += c * x[i];
      b += c;
    end
    return a / b;
  endfunction

  function automatic void ref_frame(input int W, input int H, input int T, input int TD,
                                    const ref int img[], ref int out[], ref ref_stats_t st);
    int  o[];
    bit  ex[], ey[], ez[];
    int  S;
    o  = new[W*H];
    ex = new[W*H];
    ey = new[W*H];
    ez = new[W*H];
    out = new[W*H];
    st = '{default: 0};
    foreach (img[k]) o[k] = img[k];
    // pixel classification
    for (int r = 1; r < H - 1; r++)
      for (int x = 1; x < W - 1; x++) begin
        int gx, gy;
        gx = 0; gy = 0;
        for (int k = -1; k <= 1; k++) begin
          gx += img[(r+k)*W + x+1] - img[(r+k)*W + x-1];
          gy += img[(r+1)*W + x+k] - img[(r-1)*W + x+k];
        end
        if (gx < 0) gx = -gx;
        if (gy < 0) gy = -gy;
        ex[r*W+x] = (gx >= TD);
        ey[r*W+x] = (gy >= TD);
        ez[r*W+x] = (gx + gy >= T);
      end
    // offset filtering of every deblocking block
    for (int b = 0; b < H/8 - 1; b++)
      for (int c = 0; c < W/8 - 1; c++) begin
        int r0, c0;
        r0 = 8*b + 4; c0 = 8*c + 4;
        st.db_blocks++;
        for (int i = 0; i < 8; i++) begin
          int p[8]; bit e[8];
          for (int j = 0; j < 8; j++) begin
            p[j] = o[(r0+i)*W + c0+j];
            e[j] = ex[(r0+i)*W + c0+j];
          end
          offset_line(p, e, st);
          for (int j = 0; j < 8; j++) o[(r0+i)*W + c0+j] = p[j];
        end
        for (int j = 0; j < 8; j++) begin
          int p[8]; bit e[8];
          for (int i = 0; i < 8; i++) begin
            p[i] = o[(r0+i)*W + c0+j];
            e[i] = ey[(r0+i)*W + c0+j];
          end
          offset_line(p, e, st);
          for (int i = 0; i < 8; i++) o[(r0+i)*W + c0+j] = p[i];
        end
      end
    // edge-preserving filtering, stripe by stripe
    S = H/8 - 1;
    for (int s = 0; s < S; s++) begin
      int lo, hi;
      lo = (s == 0)     ? 0      : 8*s + 4;
      hi = (s == S - 1) ? 8*s+15 : 8*s + 11;
      for (int r = lo; r <= hi; r++)
        for (int x = 0; x < W; x++) begin
          if (r == 0 || r == H-1 || x == 0 || x == W-1) begin
            st.border_pixels++;
            out[r*W+x] = img[r*W+x];
          end else if (ez[r*W+x]) begin
            int win[9];
            for (int k = 0; k < 9; k++) begin
              int rr, xx;
              rr = r + k/3 - 1; xx = x + k%3 - 1;
              win[k] = (rr >= 8*s+4 && rr <= 8*s+11) ? o[rr*W+xx] : img[rr*W+xx];
            end
            st.epf_pixels++;
            out[r*W+x] = epf(win);
          end else begin
            st.pass_pixels++;
            out[r*W+x] = o[r*W+x];
          end
        end
    end
  endfunction

  // Test image: 8x8 coded blocks of random flat levels with gentle ramps,
  // a few sharp diagonal edges and some texture, so that smooth and edge
  // pixels, large boundary steps and clipping all occur.
  function automatic void make_image(input int W, input int H, input int seed, ref int img[]);
    int lv[];
    int bw;
    img = new[W*H];
    bw = W/8;
    lv = new[bw*(H/8)];
    void'($urandom(seed));
    foreach (lv[k]) lv[k] = $urandom_range(0, 255);
    for (int r = 0; r < H; r++)
      for (int x = 0; x < W; x++) begin
        int v, kind;
        kind = ((r/8) * 7 + (x/8) * 3) % 5;
        v = lv[(r/8)*bw + x/8];
        case (kind)
          0: v = v;                                             // flat
          1: v = v + (x % 8) - (r % 8);                         // ramp
          2: v = ((x % 8) + (r % 8) > 7) ? v : 255 - v;         // diagonal edge
          3: v = v + $urandom_range(0, 6) - 3;                  // noise
          default: v = (x % 8 < 4) ? 0 : 255;                   // hard edge, extremes
        endcase
        if (v < 0) v = 0;
        if (v > 255) v = 255;
        img[r*W+x] = v;
      end
  endfunction

endpackage
