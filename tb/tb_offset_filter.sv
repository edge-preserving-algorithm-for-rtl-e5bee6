// tb_offset_filter: random lines and edge bits (including large boundary
// steps that force clipping) through one offset filter unit. The output
// register must load the filtered line on clocks with en_x high, computed by
// the reference equations, and hold its value otherwise.
`timescale 1ns/1ps
module tb_offset_filter;
  import tb_deblock_ref_pkg::*;
  logic clk = 0, rst = 1, en = 0, en_x = 0;
  logic [7:0] p [8], y [8];
  logic e [8];
  always #5 clk = ~clk;

  offset_filter dut (.clk, .rst, .en, .en_x, .p, .e, .y);

  int checks = 0, failures = 0;
  ref_stats_t st;
  logic [7:0] expy [8];

  initial begin
    st = '{default: 0};
    foreach (p[i]) begin p[i] = 0; e[i] = 0; expy[i] = 0; end
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int c = 0; c < 5000; c++) begin
      int q[8]; bit eb[8]; int kind;
      @(negedge clk);
      en   = ($urandom_range(0, 5) != 0);
      en_x = ($urandom_range(0, 2) != 0);
      kind = $urandom_range(0, 2);
      foreach (p[i]) begin
        case (kind)
          0: p[i] = 8'($urandom);
          1: p[i] = (i < 4) ? 8'($urandom_range(0, 20)) : 8'($urandom_range(235, 255));
          default: p[i] = (i < 4) ? 8'($urandom_range(235, 255)) : 8'($urandom_range(0, 20));
        endcase
        e[i] = ($urandom_range(0, 2) == 0);
        q[i] = p[i];
        eb[i] = e[i];
      end
      offset_line(q, eb, st);
      @(posedge clk);
      if (en && en_x) foreach (expy[i]) expy[i] = 8'(q[i]);
      #1;
      foreach (y[i]) begin
        checks++;
        if (y[i] !== expy[i]) begin
          failures++;
          if (failures < 10) $display("FAIL lane %0d: got %0d expected %0d", i, y[i], expy[i]);
        end
      end
    end
    checks++;
    if (st.clips == 0 || st.lanes_edge == 0 || st.lanes_smooth == 0) failures++;
    $display("clips=%0d edge lanes=%0d smooth lanes=%0d", st.clips, st.lanes_edge, st.lanes_smooth);
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
