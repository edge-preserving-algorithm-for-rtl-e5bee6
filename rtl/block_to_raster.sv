// block_to_raster: 8x8 block-to-raster unit.
//
// The same chain as the memory-reduced block buffer (N column shift registers
// of N words joined by FIFOs of L-N words), with one addition: a whole NxN
// block can be loaded into the register array in parallel. A vertical-raster
// stream entering at din leaves at dout (raster-out) (N-1)*L+N enabled clocks
// later; when load is high on an enabled clock, the register array takes
// blk_in instead of the shifted words, so the block replaces, in the output
// stream, the NxN pixels that would have been in the array after that clock.
// blk_in uses the same [row][col] orientation as raster_to_block: after the
// clock that shifts in stripe row r of column x, element [i][j] stands for
// row r-N+1+i, column x-N+1+j. The words the load overwrites are dropped; the
// FIFOs keep shifting as usual. The parallel load and the FIFO chain follow
// the design; the orientation and the reset are this implementation's choices.
module block_to_raster #(
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
  output logic [WIDTH-1:0] dout
);
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
        if (load) begin
          for (int j = 0; j < N; j++) s[k][j] <= blk_in[N-1-j][N-1-k];
        end else begin
          s[k][0] <= fifo_o[k];
          for (int j = 1; j < N; j++) s[k][j] <= s[k][j-1];
        end
      end
    end
  end

  assign dout = s[N-1][N-1];
endmodule
