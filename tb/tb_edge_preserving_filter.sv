// tb_edge_preserving_filter: random 3x3 windows (uniform, noisy-flat and
// two-level edge windows) with random Ez bits go into the filter, one per
// enabled clock with a randomly gated enable. Twelve enabled clocks later y
// must be the normalised weighted average sum(c_i x_i) / sum(c_i) with
// c_i = (255 - |x_i - x5|)^8 computed by three truncating 8-bit squarings,
// or the centre pixel when Ez = 0.
`timescale 1ns/1ps
module tb_edge_preserving_filter;
  import tb_deblock_ref_pkg::*;
  logic clk = 0, rst = 1, en = 0, ez = 0;
  logic [7:0] win [3][3], y;
  always #5 clk = ~clk;

  edge_preserving_filter dut (.clk, .rst, .en, .win, .ez, .y);

  int checks = 0, failures = 0, n_filt = 0, n_changed = 0;
  logic [7:0] expq [$];

  initial begin
    foreach (win[i, j]) win[i][j] = 0;
    repeat (11) expq.push_back(8'd0);
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int c = 0; c < 6000; c++) begin
      int x[9], kind, a, b;
      @(negedge clk);
      en   = ($urandom_range(0, 3) != 0);
      ez   = ($urandom_range(0, 2) != 0);
      kind = $urandom_range(0, 2);
      a = $urandom_range(0, 255);
      b = $urandom_range(0, 255);
      foreach (win[i, j]) begin
        case (kind)
          0: win[i][j] = 8'($urandom);
          1: win[i][j] = 8'((a > 245 ? 245 : a) + $urandom_range(0, 10));
          default: win[i][j] = (i + j + $urandom_range(0, 1) > 2) ? 8'(a) : 8'(b);
        endcase
        x[3*i+j] = win[i][j];
      end
      @(posedge clk);
      #1;
      if (en) begin
        logic [7:0] e;
        expq.push_back(ez ? 8'(epf(x)) : 8'(x[4]));
        if (ez) n_filt++;
        if (ez && epf(x) != x[4]) n_changed++;
        e = expq.pop_front();
        checks++;
        if (y !== e) begin
          failures++;
          if (failures < 10) $display("FAIL: got %0d expected %0d", y, e);
        end
      end
    end
    checks++;
    if (n_changed == 0) failures++;
    $display("filtered=%0d changed=%0d", n_filt, n_changed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
