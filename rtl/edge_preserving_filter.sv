// edge_preserving_filter: 12-stage pipelined edge-preserving 3x3 filter.
//
// For a window x1..x9 (x5 the centre) each neighbour gets the weight
// c_i = (255 - |x_i - x5|)^8, so pixels close in intensity to the centre
// dominate and smoothing follows edges instead of crossing them. The output
// is sum(c_i * x_i) / sum(c_i) where ez = 1 (edge pixel) and x5 otherwise.
// Fixed point as in the design: every multiplier is 8x8 -> 16 bits and only
// the 8 high bits of a product go on, so the power 8 is three truncating
// squarings (t -> t^2 -> t^4 -> t^8). The centre weight is the constant the
// same chain gives for d = 0 (248 in this representation of 255^8).
//
// Pipeline (one window per enabled clock, output valid 12 enabled clocks
// after the window and its ez bit were presented):
//   1     intensity distance and 255 - d
//   2-4   three squarings (coefficient extraction)
//   5     nine products c_i * x_i
//   6-7   two-level adder trees for A = sum(c_i x_i) and B = sum(c_i)
//   8-11  A div B (4-stage restoring divider, floor)
//   12    multiplexer (ez ? A/B : x5) and output register
// x5 reaches the multiplexer through the four coefficient stages and a FIFO
// of 7, ez through a FIFO of 11. The stage boundaries follow the design's
// 12-stage pipeline; where exactly a product is registered relative to the B
// adder is this implementation's choice.
module edge_preserving_filter
  import deblock_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  logic en,
  input  pix_t win [3][3],
  input  logic ez,
  output pix_t y
);
  localparam logic [7:0] C5 = epf_coef(8'd0);

  pix_t        xw  [9];
  logic [7:0]  t1  [9], t2 [9], t4 [9], c4 [9], c5r [9];
  pix_t        xs  [4][9];        // window delayed alongside stages 1..4
  logic [15:0] prod[9];
  logic [17:0] pa  [3];
  logic [9:0]  pb  [3];
  logic [19:0] sum_a;
  logic [11:0] sum_b;
  logic [7:0]  quo;
  pix_t        x5_d;
  logic        ez_d;

  always_comb begin
    for (int i = 0; i < 9; i++) xw[i] = win[i / 3][i % 3];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < 9; i++) begin
        t1[i] <= '0; t2[i] <= '0; t4[i] <= '0; c4[i] <= '0;
        c5r[i] <= '0; prod[i] <= '0;
        for (int s = 0; s < 4; s++) xs[s][i] <= '0;
      end
      for (int g = 0; g < 3; g++) begin
        pa[g] <= '0;
        pb[g] <= '0;
      end
      sum_a <= '0;
      sum_b <= '0;
    end else if (en) begin
      for (int i = 0; i < 9; i++) begin
        // stage 1: t = 255 - |x_i - x5|
        t1[i] <= 8'd255 - ((xw[i] > xw[4]) ? xw[i] - xw[4] : xw[4] - xw[i]);
        // stages 2-4: t^2, t^4, t^8 keeping the 8 high product bits
        t2[i] <= sq_hi(t1[i]);
        t4[i] <= sq_hi(t2[i]);
        c4[i] <= (i == 4) ? C5 : sq_hi(t4[i]);
        xs[0][i] <= xw[i];
        for (int s = 1; s < 4; s++) xs[s][i] <= xs[s-1][i];
        // stage 5: products, coefficients kept for the B adder
        prod[i] <= c4[i] * xs[3][i];
        c5r[i]  <= c4[i];
      end
      // stages 6-7: adder trees
      for (int g = 0; g < 3; g++) begin
        pa[g] <= 18'(prod[3*g]) + 18'(prod[3*g+1]) + 18'(prod[3*g+2]);
        pb[g] <= 10'(c5r[3*g]) + 10'(c5r[3*g+1]) + 10'(c5r[3*g+2]);
      end
      sum_a <= 20'(pa[0]) + 20'(pa[1]) + 20'(pa[2]);
      sum_b <= 12'(pb[0]) + 12'(pb[1]) + 12'(pb[2]);
    end
  end

  // stages 8-11: A div B
  pipelined_divider #(.AW(20), .BW(12), .QW(8), .STAGES(4)) u_div (
    .clk(clk), .rst(rst), .en(en), .a(sum_a), .b(sum_b), .q(quo));

  // x5: four coefficient stages + FIFO(7); ez: FIFO(11)
  delay_fifo #(.WIDTH(PIX_W), .DEPTH(7))  u_x5_fifo (
    .clk(clk), .rst(rst), .en(en), .din(xs[3][4]), .dout(x5_d));
  delay_fifo #(.WIDTH(1),     .DEPTH(11)) u_ez_fifo (
    .clk(clk), .rst(rst), .en(en), .din(ez), .dout(ez_d));

  // stage 12: multiplexer and output register
  always_ff @(posedge clk) begin
    if (rst)     y <= '0;
    else if (en) y <= ez_d ? quo : x5_d;
  end
endmodule
