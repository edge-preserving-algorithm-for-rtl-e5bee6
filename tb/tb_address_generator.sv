// tb_address_generator: runs several frame sizes (including the smallest,
// 16x16, and a non-square one) through the vertical-raster scan with a
// randomly gated enable. Every position must follow the order stripe by
// stripe (stripes 8 rows apart, height/8 - 1 of them), column by column, 16
// rows top to bottom, with address (8*stripe + row) * width + col; last must
// mark exactly the final position, after which active drops. A start while
// the scan runs must be ignored.
`timescale 1ns/1ps
module tb_address_generator;
  localparam int MW = 64, MH = 48;
  localparam int XW = $clog2(MW + 1), YW = $clog2(MH + 1), AW = $clog2(MW * MH);
  logic clk = 0, rst = 1, en = 0, start = 0;
  logic [XW-1:0] width;
  logic [YW-1:0] height;
  logic active, last;
  logic [YW-4:0] stripe, ns;
  logic [XW-1:0] col;
  logic [3:0] row;
  logic [AW-1:0] addr;
  always #5 clk = ~clk;

  address_generator #(.MAX_WIDTH(MW), .MAX_HEIGHT(MH)) dut (
    .clk, .rst, .en, .start, .width, .height, .active, .stripe, .col, .row, .addr,
    .last, .num_stripes(ns));

  int checks = 0, failures = 0;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    int ws[4] = '{16, 40, 64, 24};
    int hs[4] = '{16, 48, 24, 32};
    width = 0; height = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int f = 0; f < 4; f++) begin
      int W, H, k, total;
      W = ws[f]; H = hs[f];
      total = (H/8 - 1) * W * 16;
      @(negedge clk);
      en = 1; start = 1; width = XW'(W); height = YW'(H);
      @(posedge clk);
      k = 0;
      while (k < total) begin
        @(negedge clk);
        en = ($urandom_range(0, 3) != 0);
        start = ($urandom_range(0, 50) == 0);   // must be ignored while active
        width = XW'($urandom); height = YW'($urandom);
        #1;
        if (en) begin
          int s, x, r;
          s = k / (16*W); x = (k / 16) % W; r = k % 16;
          chk(active, $sformatf("inactive at k=%0d", k));
          chk(stripe == s && col == x && row == r,
              $sformatf("k=%0d position %0d/%0d/%0d expected %0d/%0d/%0d", k, stripe, col, row, s, x, r));
          chk(addr == AW'((8*s + r) * W + x), $sformatf("k=%0d addr %0d", k, addr));
          chk(last == (k == total - 1), $sformatf("k=%0d last=%b", k, last));
          k++;
        end
        @(posedge clk);
      end
      @(negedge clk) start = 0; en = 1;
      #1 chk(!active, "still active after the last position");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
