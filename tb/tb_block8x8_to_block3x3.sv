// tb_block8x8_to_block3x3: like the block-to-raster test, a numbered stream
// with 8x8 blocks loaded every 100 enabled clocks, but checking the 3x3
// windows: after the clock that shifts in index n, element [i][j] must hold
// the modified stream at index n - 120 - (2-j)*16 - (2-i).
`timescale 1ns/1ps
module tb_block8x8_to_block3x3;
  logic clk = 0, rst = 1, en = 0, load = 0;
  logic [7:0] din;
  logic [7:0] blk [8][8];
  logic [7:0] win [3][3];
  always #5 clk = ~clk;

  block8x8_to_block3x3 #(.WIDTH(8), .N(8), .L(16)) dut (
    .clk, .rst, .en, .din, .load, .blk_in(blk), .win3(win));

  int checks = 0, failures = 0, loads = 0;
  int n = -1;
  logic [7:0] vals [4096];

  function automatic logic [7:0] v(int k);
    return 8'(k * 29 + (k >> 3));
  endfunction

  function automatic logic [7:0] at(int k);
    return (k < 0) ? 8'd0 : vals[k];
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
      load = en && ((n + 1) % 100 == 30) && (n > 200);
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
      for (int i = 0; i < 3; i++)
        for (int j = 0; j < 3; j++) begin
          checks++;
          if (win[i][j] !== at(n - 120 - (2-j)*16 - (2-i))) begin
            failures++;
            if (failures < 10) $display("FAIL n=%0d [%0d][%0d]: got %0d expected %0d",
                                        n, i, j, win[i][j], at(n - 120 - (2-j)*16 - (2-i)));
          end
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
