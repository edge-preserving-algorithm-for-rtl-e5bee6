// offset_filter_block: horizontal then vertical offset filtering of one 8x8
// deblocking block.
//
// A deblocking block is the 8x8 square centred on a corner of the 8x8 coding
// grid, so its 4|4 split lies on a vertical and a horizontal block boundary.
// On cap the block (pix), its Ex map and its Ey map are captured. While en_x
// is high the horizontal offset filter takes one block row per enabled clock
// (rows 0..7, Ex bits of the row); the filtered rows are collected in the
// intermediate block register. While en_y is high the vertical offset filter
// takes one column of the intermediate block per enabled clock (columns 0..7,
// Ey bits of the column); the filtered columns are collected in blk_out.
//
// Timing (enabled clocks, c0 = cycle with cap high): en_x must be high in
// c0+1..c0+8 and en_y in c0+10..c0+17; blk_out holds the finished block from
// cycle c0+19 until the next capture completes. The two filter units are
// identical and differ only in the vector and edge map they are given, as in
// the design; the shift-register sequencing of rows and columns is this
// implementation's choice.
module offset_filter_block
  import deblock_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  logic en,
  input  logic cap,
  input  logic en_x,
  input  logic en_y,
  input  pix_t win_p  [8][8],
  input  logic win_ex [8][8],
  input  logic win_ey [8][8],
  output pix_t blk_out[8][8]
);
  pix_t blk_p  [8][8];   // captured pixels, rows shift up under en_x
  logic blk_ex [8][8];   // captured Ex map, rows shift up under en_x
  logic blk_ey [8][8];   // captured Ey map, columns shift left under en_y
  pix_t mid    [8][8];   // horizontally filtered block

  pix_t h_p [8], v_p [8], h_y [8], v_y [8];
  logic h_e [8], v_e [8];
  logic h_vld, v_vld;

  always_comb begin
    for (int i = 0; i < 8; i++) begin
      h_p[i] = blk_p[0][i];
      h_e[i] = blk_ex[0][i];
      v_p[i] = mid[i][0];
      v_e[i] = blk_ey[i][0];
    end
  end

  offset_filter u_hfilt (.clk(clk), .rst(rst), .en(en), .en_x(en_x), .p(h_p), .e(h_e), .y(h_y));
  offset_filter u_vfilt (.clk(clk), .rst(rst), .en(en), .en_x(en_y), .p(v_p), .e(v_e), .y(v_y));

  always_ff @(posedge clk) begin
    if (rst) begin
      h_vld <= 1'b0;
      v_vld <= 1'b0;
      for (int i = 0; i < 8; i++)
        for (int j = 0; j < 8; j++) begin
          blk_p[i][j]   <= '0;
          blk_ex[i][j]  <= 1'b0;
          blk_ey[i][j]  <= 1'b0;
          mid[i][j]     <= '0;
          blk_out[i][j] <= '0;
        end
    end else if (en) begin
      h_vld <= en_x;
      v_vld <= en_y;
      if (cap) begin
        blk_p  <= win_p;
        blk_ex <= win_ex;
        blk_ey <= win_ey;
      end else if (en_x) begin
        for (int i = 0; i < 7; i++) begin
          blk_p[i]  <= blk_p[i+1];
          blk_ex[i] <= blk_ex[i+1];
        end
      end else if (en_y) begin
        for (int i = 0; i < 8; i++)
          for (int j = 0; j < 7; j++) blk_ey[i][j] <= blk_ey[i][j+1];
      end
      if (h_vld) begin
        for (int i = 0; i < 7; i++) mid[i] <= mid[i+1];
        mid[7] <= h_y;
      end else if (en_y) begin
        for (int i = 0; i < 8; i++)
          for (int j = 0; j < 7; j++) mid[i][j] <= mid[i][j+1];
      end
      if (v_vld) begin
        for (int i = 0; i < 8; i++) begin
          for (int j = 0; j < 7; j++) blk_out[i][j] <= blk_out[i][j+1];
          blk_out[i][7] <= v_y[i];
        end
      end
    end
  end
endmodule
