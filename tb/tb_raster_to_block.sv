// tb_raster_to_block: feeds a numbered vertical-raster stream (stripe height
// 16) into an 8x8 and a 3x3 buffer with a randomly gated enable and checks,
// after every enabled clock, every window element and the raster output
// against the positions they must hold: element [i][j] of an NxN window whose
// newest pixel has stream index n is index n - (N-1-j)*16 - (N-1-i), and the
// raster output is index n - (N-1)*16 - (N-1).
`timescale 1ns/1ps
module tb_raster_to_block;
  logic clk = 0, rst = 1, en = 0;
  logic [7:0] din;
  logic [7:0] w8 [8][8];
  logic [7:0] w3 [3][3];
  logic [7:0] o8, o3;
  always #5 clk = ~clk;

  raster_to_block #(.WIDTH(8), .N(8), .L(16)) u8 (.clk, .rst, .en, .din, .blk(w8), .dout(o8));
  raster_to_block #(.WIDTH(8), .N(3), .L(16)) u3 (.clk, .rst, .en, .din, .blk(w3), .dout(o3));

  int checks = 0, failures = 0;
  int n = -1;    // index of the newest pixel shifted in

  function automatic logic [7:0] v(int k);
    return (k < 0) ? 8'd0 : 8'((k * 37 + (k >> 4) * 11) ^ (k >> 7));
  endfunction

  task automatic chk(logic [7:0] got, logic [7:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL n=%0d %s: got %0d expected %0d", n, what, got, exp);
    end
  endtask

  initial begin
    din = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int c = 0; c < 1500; c++) begin
      @(negedge clk);
      en  = ($urandom_range(0, 4) != 0);
      din = v(n + 1);
      @(posedge clk);
      if (en) n++;
      #1;
      for (int i = 0; i < 8; i++)
        for (int j = 0; j < 8; j++)
          chk(w8[i][j], v(n - (7-j)*16 - (7-i)), $sformatf("w8[%0d][%0d]", i, j));
      for (int i = 0; i < 3; i++)
        for (int j = 0; j < 3; j++)
          chk(w3[i][j], v(n - (2-j)*16 - (2-i)), $sformatf("w3[%0d][%0d]", i, j));
      chk(o8, v(n - 7*16 - 7), "raster-out 8x8");
      chk(o3, v(n - 2*16 - 2), "raster-out 3x3");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
