// raster_to_block: memory-reduced NxN block buffer for a vertical-raster stream.
//
// The input arrives column by column, each column being the L pixels of one
// image column inside a stripe of L rows, top to bottom. The buffer is an NxN
// register array made of N column shift registers of N words, chained through
// FIFOs of L-N words: a word leaving the top of column stage k waits L-N
// cycles and enters column stage k+1, so stage k+1 holds the same rows of the
// image column to the left. With L = 16 and N = 8 this is 7*16+8 = 120 words,
// with N = 3 it is 2*13+9 = 35 words; a horizontal-raster buffer would need
// whole image lines instead (7*W+8 words).
//
// Interface: one word enters per enabled clock. After the clock that shifts in
// the pixel at stripe row r of image column x, blk[i][j] holds the pixel at
// row r-N+1+i, column x-N+1+j (row 0 top, column 0 left), which is a valid
// NxN window when r >= N-1. dout (raster-out) is the word leaving the last
// column stage, the input delayed by (N-1)*L+N enabled clocks.
// The chain structure follows the memory-reduced buffer of the design; the
// output orientation and the reset to zero are this implementation's choices.
module raster_to_block #(
  parameter int WIDTH = 8,
  parameter int N     = 8,
  parameter int L     = 16
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             en,
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] blk [N][N],
  output logic [WIDTH-1:0] dout
);
  // s[k][j]: column stage k (0 = newest image column), element j (0 = newest).
  logic [WIDTH-1:0] s     [N][N];
  logic [WIDTH-1:0] fifo_o[N];

  for (genvar k = 0; k < N; k++) begin : g_col
    if (k > 0) begin : g_fifo
      delay_fifo #(.WIDTH(WIDTH), .DEPTH(L - N)) u_fifo (
        .clk(clk), .rst(rst), .en(en), .din(s[k-1][N-1]), .dout(fifo_o[k]));
    end else begin : g_in
      assign fifo_o[k] = din;
    end
    always_ff @(posedge clk) begin
      if (rst) begin
        for (int j = 0; j < N; j++) s[k][j] <= '0;
      end else if (en) begin
        s[k][0] <= fifo_o[k];
        for (int j = 1; j < N; j++) s[k][j] <= s[k][j-1];
      end
    end
  end

  always_comb begin
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++)
        blk[i][j] = s[N-1-j][N-1-i];
  end

  assign dout = s[N-1][N-1];
endmodule
