// deblocking_filter_core: pipelined edge-preserving deblocking filter.
//
// Removes the block artifacts of block-DCT coded video (grid, staircase and
// corner-outlier noise) from an 8-bit grey frame of up to 1920x1080 pixels.
// Each pixel is classified by a 3x3 Prewitt detector into smooth or edge
// (maps Ex, Ey, Ez). Every 8x8 deblocking block, centred on a corner of the
// coding grid, is then offset-filtered horizontally (with Ex) and vertically
// (with Ey): smooth pixels are pulled across the block boundary step with
// weights 1/16..1/2. Finally pixels marked as edges in Ez are replaced by an
// edge-preserving weighted average of their 3x3 neighbourhood.
//
// Data flow (all stages advance on clk when clk_en is high):
//   image memory --(vertical raster, 16-row stripes)--> pixel_in
//   pixel_in -> raster-to-3x3 -> pixel classifier -> Ex, Ey, Ez
//   pixel_in -> delay(21) -> raster-to-8x8 (pixels, Ex map, Ey map)
//            -> horizontal + vertical offset filters (offset_filter_block)
//   delay(20) -> 8x8-to-3x3 (filtered blocks loaded back into the stream)
//            -> edge-preserving filter (Ez map delayed 158) -> pixel_out
// The frame is read in stripes of 16 rows starting 8 rows apart; each stripe
// writes the 8 rows around its middle block boundary (plus the top 4 or bottom
// 4 frame rows in the first and last stripe), so two pixels are read for each
// one written: one output pixel per two clocks, 1080p30 at 150 MHz.
//
// Interface: pulse start (while busy is low) with frame_width/frame_height
// (multiples of 8, >= 16). The core then issues one read address per enabled
// clock on rd_addr with rd_en; pixel_in must carry that pixel one enabled
// clock later (synchronous memory). Results leave on pixel_out with wr_addr
// and wr_en, 192 enabled clocks after the matching pixel_in; rdy pulses with
// the first result of a frame and done with the last.
//
// Follows the design: block structure, 8-bit pixels, thresholds, 3-stage
// classifier, 12-stage filter, 16-row vertical raster buffers with FIFOs of
// 8 and 13 words, the 192-clock latency. This implementation's own choices:
// the 8-row stripe overlap, the rows each stripe writes, clipping of offset
// filter results, and the stream timing details. The band rows next to a
// stripe edge (rows 4 and 11) see unfiltered pixels of the neighbouring
// stripe in their 3x3 window, because a 16-row stripe cannot hold the
// offset-filtered rows of the stripes above and below.
module deblocking_filter_core
  import deblock_pkg::*;
#(
  parameter int MAX_WIDTH  = 1920,
  parameter int MAX_HEIGHT = 1080,
  parameter int T  = 20,
  parameter int TD = 10,
  parameter int XW = $clog2(MAX_WIDTH + 1),
  parameter int YW = $clog2(MAX_HEIGHT + 1),
  parameter int AW = $clog2(MAX_WIDTH * MAX_HEIGHT)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          clk_en,
  input  logic          start,
  input  logic [XW-1:0] frame_width,
  input  logic [YW-1:0] frame_height,
  output logic          busy,
  output logic [AW-1:0] rd_addr,
  output logic          rd_en,
  input  pix_t          pixel_in,
  output pix_t          pixel_out,
  output logic [AW-1:0] wr_addr,
  output logic          wr_en,
  output logic          rdy,
  output logic          done
);
  // Pipeline timing, in enabled clocks.
  localparam int L       = STRIPE;
  localparam int CLS_LAT = 1 + 3;                  // 3x3 buffer + classifier
  localparam int D_PIX   = (L + 1) + CLS_LAT;      // window centre offset + classifier = 21
  localparam int D_LOAD  = 20;                     // capture -> block load
  localparam int B2R_LAT = (BLK - 1) * L + BLK;    // 120
  localparam int D_EZ    = D_LOAD + B2R_LAT + (L + 1) + 1;  // 158
  localparam int EPF_LAT = 12;
  localparam int D_A     = 1 + D_PIX;              // read start -> aligned stream = 22
  localparam int D_W     = D_A + D_LOAD + B2R_LAT + 1 + (L + 1) + EPF_LAT; // 192

  // ---------------- control ----------------
  logic en_z, cap, en_x, en_y, load;
  logic wr_en_c, first_c, done_c;
  logic [AW-1:0] wr_addr_c;

  deblock_controller #(.MAX_WIDTH(MAX_WIDTH), .MAX_HEIGHT(MAX_HEIGHT),
                       .D_A(D_A), .D_W(D_W)) u_ctrl (
    .clk(clk), .rst(rst), .en(clk_en), .start(start),
    .width(frame_width), .height(frame_height), .busy(busy),
    .rd_addr(rd_addr), .rd_en(rd_en),
    .en_z(en_z), .cap(cap), .en_x(en_x), .en_y(en_y), .load(load),
    .wr_addr(wr_addr_c), .wr_en(wr_en_c), .first_out(first_c), .done(done_c));

  // ---------------- pixel classification ----------------
  pix_t win_in [3][3];
  pix_t r2b3_out;
  logic ex, ey, ez;

  raster_to_block #(.WIDTH(PIX_W), .N(3), .L(L)) u_r2b3 (
    .clk(clk), .rst(rst), .en(clk_en), .din(pixel_in), .blk(win_in), .dout(r2b3_out));

  pixel_classifier #(.T(T), .TD(TD)) u_cls (
    .clk(clk), .rst(rst), .en(clk_en), .win(win_in), .ex(ex), .ey(ey), .ez(ez));

  // ---------------- aligned stream and 8x8 buffers ----------------
  pix_t pix_a, r2b8_out;
  logic ex_out, ey_out;
  pix_t win_p  [BLK][BLK];
  logic win_ex [BLK][BLK];
  logic win_ey [BLK][BLK];

  delay_fifo #(.WIDTH(PIX_W), .DEPTH(D_PIX)) u_pix_delay (
    .clk(clk), .rst(rst), .en(clk_en), .din(pixel_in), .dout(pix_a));

  raster_to_block #(.WIDTH(PIX_W), .N(BLK), .L(L)) u_r2b8 (
    .clk(clk), .rst(rst), .en(clk_en), .din(pix_a), .blk(win_p), .dout(r2b8_out));
  raster_to_block #(.WIDTH(1), .N(BLK), .L(L)) u_ex_map (
    .clk(clk), .rst(rst), .en(clk_en), .din(ex), .blk(win_ex), .dout(ex_out));
  raster_to_block #(.WIDTH(1), .N(BLK), .L(L)) u_ey_map (
    .clk(clk), .rst(rst), .en(clk_en), .din(ey), .blk(win_ey), .dout(ey_out));

  // ---------------- offset filters ----------------
  pix_t blk_f [BLK][BLK];

  offset_filter_block u_ofb (
    .clk(clk), .rst(rst), .en(clk_en), .cap(cap), .en_x(en_x), .en_y(en_y),
    .win_p(win_p), .win_ex(win_ex), .win_ey(win_ey), .blk_out(blk_f));

  // ---------------- back to raster and to 3x3 ----------------
  pix_t pix_b;
  pix_t win_f [3][3];

  delay_fifo #(.WIDTH(PIX_W), .DEPTH(D_LOAD)) u_load_delay (
    .clk(clk), .rst(rst), .en(clk_en), .din(pix_a), .dout(pix_b));

  block8x8_to_block3x3 #(.WIDTH(PIX_W), .N(BLK), .L(L)) u_b2b3 (
    .clk(clk), .rst(rst), .en(clk_en), .din(pix_b), .load(load), .blk_in(blk_f),
    .win3(win_f));

  // ---------------- Ez map and edge-preserving filter ----------------
  logic ez_d;
  pix_t y;

  delay_fifo #(.WIDTH(1), .DEPTH(D_EZ)) u_ez_map (
    .clk(clk), .rst(rst), .en(clk_en), .din(ez && en_z), .dout(ez_d));

  edge_preserving_filter u_epf (
    .clk(clk), .rst(rst), .en(clk_en), .win(win_f), .ez(ez_d), .y(y));

  // ---------------- output register (to the line buffer) ----------------
  always_ff @(posedge clk) begin
    if (rst) begin
      pixel_out <= '0;
      wr_addr   <= '0;
      wr_en     <= 1'b0;
      rdy       <= 1'b0;
      done      <= 1'b0;
    end else if (clk_en) begin
      pixel_out <= y;
      wr_addr   <= wr_addr_c;
      wr_en     <= wr_en_c;
      rdy       <= first_c;
      done      <= done_c;
    end
  end
endmodule
