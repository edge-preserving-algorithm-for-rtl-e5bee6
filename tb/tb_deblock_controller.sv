// tb_deblock_controller: runs the controller alone for two frame sizes with a
// randomly gated enable and checks its schedule against an independent scan
// model: the first read comes the enabled clock after start; every cap comes
// D_A+1 enabled clocks after the read of a deblocking-block corner (stripe
// row 11, column 8c+11, c = 0..W/8-2) and is followed by en_x on the next 8
// enabled clocks, en_y on the 8 after one idle clock and load on the 19th;
// en_z is high exactly D_A enabled clocks after the read of a pixel not on
// the frame border; wr_en is high D_W enabled clocks after the read of each
// pixel the stripe owns, with wr_addr equal to that read address; first_out
// and done pulse once per frame and busy falls after done.
`timescale 1ns/1ps
module tb_deblock_controller;
  localparam int MW = 64, MH = 48, DA = 22, DW = 192;
  localparam int XW = $clog2(MW + 1), YW = $clog2(MH + 1), AW = $clog2(MW * MH);
  logic clk = 0, rst = 1, en = 0, start = 0;
  logic [XW-1:0] width;
  logic [YW-1:0] height;
  logic busy, rd_en, en_z, cap, en_x, en_y, load, wr_en, first_out, done;
  logic [AW-1:0] rd_addr, wr_addr;
  always #5 clk = ~clk;

  deblock_controller #(.MAX_WIDTH(MW), .MAX_HEIGHT(MH), .D_A(DA), .D_W(DW)) dut (
    .clk, .rst, .en, .start, .width, .height, .busy, .rd_addr, .rd_en, .en_z, .cap,
    .en_x, .en_y, .load, .wr_addr, .wr_en, .first_out, .done);

  int checks = 0, failures = 0;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  // expected per enabled-clock index after start
  typedef struct packed { logic rd; logic ez; logic cap; logic ex; logic ey; logic ld; logic wr; logic [15:0] wa; } ev_t;

  initial begin
    int ws[2] = '{32, 48};
    int hs[2] = '{24, 16};
    width = 0; height = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int f = 0; f < 2; f++) begin
      int W, H, S, total, len, n, caps, firsts, dones;
      ev_t ev[];
      W = ws[f]; H = hs[f]; S = H/8 - 1;
      total = S * W * 16;
      len = total + DW + 40;
      ev = new[len];
      foreach (ev[i]) ev[i] = '0;
      for (int k = 0; k < total; k++) begin
        int s, x, r, R;
        s = k / (16*W); x = (k / 16) % W; r = k % 16; R = 8*s + r;
        ev[1 + k].rd = 1;
        if (R != 0 && R != H-1 && x != 0 && x != W-1) ev[1 + k + DA].ez = 1;
        if (r == 11 && x % 8 == 3 && x >= 11 && x <= W - 5) begin
          ev[2 + k + DA].cap = 1;
          for (int i = 1; i <= 8; i++) ev[2 + k + DA + i].ex = 1;
          for (int i = 10; i <= 17; i++) ev[2 + k + DA + i].ey = 1;
          ev[2 + k + DA + 19].ld = 1;
        end
        if ((r >= 4 && r <= 11) || (s == 0 && r < 4) || (s == S-1 && r > 11)) begin
          ev[1 + k + DW].wr = 1;
          ev[1 + k + DW].wa = 16'((8*s + r) * W + x);
        end
      end
      @(negedge clk);
      en = 1; start = 1; width = XW'(W); height = YW'(H);
      @(posedge clk);
      n = 0; caps = 0; firsts = 0; dones = 0;
      while (n < len - 1) begin
        @(negedge clk);
        start = 0;
        en = ($urandom_range(0, 3) != 0);
        #1;
        if (en) begin
          n++;
          chk(rd_en == ev[n].rd && en_z == ev[n].ez && cap == ev[n].cap && en_x == ev[n].ex
              && en_y == ev[n].ey && load == ev[n].ld && wr_en == ev[n].wr,
              $sformatf("frame %0d clock %0d: rd=%b ez=%b cap=%b ex=%b ey=%b ld=%b wr=%b expected %b%b%b%b%b%b%b",
                        f, n, rd_en, en_z, cap, en_x, en_y, load, wr_en, ev[n].rd, ev[n].ez, ev[n].cap,
                        ev[n].ex, ev[n].ey, ev[n].ld, ev[n].wr));
          if (wr_en) chk(wr_addr == AW'(ev[n].wa), $sformatf("wr_addr %0d expected %0d", wr_addr, ev[n].wa));
          if (cap) caps++;
          if (first_out) firsts++;
          if (done) dones++;
        end
        @(posedge clk);
      end
      chk(caps == S * (W/8 - 1), $sformatf("caps %0d", caps));
      chk(firsts == 1 && dones == 1, "first_out/done once");
      chk(!busy, "busy after the frame");
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
