// tb_offset_filter_block: random 8x8 blocks with random Ex/Ey maps are
// captured and filtered with the control sequence the core uses (cap, en_x
// for 8 enabled clocks, one idle clock, en_y for 8 enabled clocks). From the
// 19th enabled clock after the capture blk_out must equal the block filtered
// along its rows with Ex and then along its columns with Ey. The enable is
// gated at random, and the next block's capture must not disturb the check.
`timescale 1ns/1ps
module tb_offset_filter_block;
  import tb_deblock_ref_pkg::*;
  logic clk = 0, rst = 1, en = 0, cap = 0, en_x = 0, en_y = 0;
  logic [7:0] win_p [8][8], blk_out [8][8];
  logic win_ex [8][8], win_ey [8][8];
  always #5 clk = ~clk;

  offset_filter_block dut (.clk, .rst, .en, .cap, .en_x, .en_y, .win_p, .win_ex, .win_ey, .blk_out);

  int checks = 0, failures = 0;
  ref_stats_t st;

  task automatic step(logic c, logic x, logic y);
    do begin
      @(negedge clk);
      en = ($urandom_range(0, 3) != 0);
      cap = c; en_x = x; en_y = y;
      @(posedge clk);
    end while (!en);
  endtask

  initial begin
    st = '{default: 0};
    foreach (win_p[i, j]) begin win_p[i][j] = 0; win_ex[i][j] = 0; win_ey[i][j] = 0; end
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int b = 0; b < 200; b++) begin
      int o[8][8];
      foreach (win_p[i, j]) begin
        win_p[i][j]  = (b % 3 == 0) ? 8'($urandom) : 8'(((j < 4) ? 60 : 190) + $urandom_range(0, 9));
        win_ex[i][j] = ($urandom_range(0, 3) == 0);
        win_ey[i][j] = ($urandom_range(0, 3) == 0);
        o[i][j] = win_p[i][j];
      end
      for (int i = 0; i < 8; i++) begin
        int q[8]; bit e[8];
        for (int j = 0; j < 8; j++) begin q[j] = o[i][j]; e[j] = win_ex[i][j]; end
        offset_line(q, e, st);
        for (int j = 0; j < 8; j++) o[i][j] = q[j];
      end
      for (int j = 0; j < 8; j++) begin
        int q[8]; bit e[8];
        for (int i = 0; i < 8; i++) begin q[i] = o[i][j]; e[i] = win_ey[i][j]; end
        offset_line(q, e, st);
        for (int i = 0; i < 8; i++) o[i][j] = q[i];
      end
      step(1, 0, 0);
      #1;
      // scramble the inputs: they must not matter after the capture
      foreach (win_p[i, j]) begin win_p[i][j] = 8'($urandom); win_ex[i][j] = 1'($urandom); win_ey[i][j] = 1'($urandom); end
      repeat (8) step(0, 1, 0);
      step(0, 0, 0);
      repeat (8) step(0, 0, 1);
      step(0, 0, 0);
      #1;
      foreach (blk_out[i, j]) begin
        checks++;
        if (blk_out[i][j] !== 8'(o[i][j])) begin
          failures++;
          if (failures < 10) $display("FAIL block %0d [%0d][%0d]: got %0d expected %0d", b, i, j, blk_out[i][j], o[i][j]);
        end
      end
      repeat ($urandom_range(0, 3)) step(0, 0, 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
