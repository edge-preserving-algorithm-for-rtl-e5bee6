// block8x8_to_block3x3: converts offset-filtered 8x8 blocks into 3x3 windows.
//
// It combines the 8x8 block-to-raster unit with a raster-to-3x3 block buffer:
// the vertical-raster stream din passes through the 8x8 register array, where
// a filtered 8x8 block can be loaded in parallel (load, blk_in), and the
// resulting stream feeds a 3x3 buffer (3x3 registers and two FIFOs of 13
// words for a 16-row stripe). win3 is the 3x3 window whose newest (bottom
// right) pixel left the 8x8 array one enabled clock earlier; the total delay
// from din to the newest pixel of win3 is (N-1)*L+N+1 enabled clocks. The
// composition follows the design; the port names are this implementation's.
module block8x8_to_block3x3 #(
  parameter int WIDTH = 8,
  parameter int N     = 8,
  parameter int L     = 16
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             en,
  input  logic [WIDTH-1:0] din,
  input  logic             load,
  input  logic [WIDTH-1:0] blk_in [N][N],
  output logic [WIDTH-1:0] win3   [3][3]
);
  logic [WIDTH-1:0] raster;
  logic [WIDTH-1:0] unused_out;

  block_to_raster #(.WIDTH(WIDTH), .N(N), .L(L)) u_b2r (
    .clk(clk), .rst(rst), .en(en), .din(din), .load(load), .blk_in(blk_in),
    .dout(raster));

  raster_to_block #(.WIDTH(WIDTH), .N(3), .L(L)) u_r2b3 (
    .clk(clk), .rst(rst), .en(en), .din(raster), .blk(win3), .dout(unused_out));
endmodule
