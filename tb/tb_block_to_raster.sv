// tb_block_to_raster: streams numbered pixels through the 8x8 block-to-raster
// unit and, every 100 enabled clocks, loads a block of distinct values. A
// model of the stream in which each load replaces the 64 positions the
// register array stands for (element [i][j] after the clock that shifts in
// index n stands for index n - (7-j)*16 - (7-i)) must match raster-out, which
// is the stream delayed by 7*16+8 = 120 enabled clocks.
`timescale 1ns/1ps
module tb_block_to_raster;
  logic clk = 0, rst = 1, en = 0, load = 0;
  logic [7:0] din, dout;
  logic [7:0] blk [8][8];
  always #5 clk = ~clk;

  block_to_raster #(.WIDTH(8), .N(8), .L(16)) dut (.clk, .rst, .en, .din, .load, .blk_in(blk), .dout);

  int checks = 0, failures = 0, loads = 0;
  int n = -1;
  logic [7:0] vals [4096];

  function automatic logic [7:0] v(int k);
    return 8'(k * 13 + (k >> 5));
  endfunction

  initial begin
    din = 0;
    foreach (vals[k]) vals[k] = v(k);
    foreach (blk[i, j]) blk[i][j] = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      en   = ($urandom_range(0, 4) != 0);
      din  = v(n + 1);
      load = en && ((n + 1) % 100 == 50) && (n > 200);
      foreach (blk[i, j]) blk[i][j] = 8'($urandom);
      @(posedge clk);
      if (en) begin
        n++;
        if (load) begin
          loads++;
          foreach (blk[i, j]) vals[n - (7-j)*16 - (7-i)] = blk[i][j];
        end
      end
      #1;
      checks++;
      if (dout !== ((n - 119 >= 0) ? vals[n - 119] : 8'd0)) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d: got %0d expected %0d", n, dout, vals[n-119]);
      end
    end
    checks++;
    if (loads < 5) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
