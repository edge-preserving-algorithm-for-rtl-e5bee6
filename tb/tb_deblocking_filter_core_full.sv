// tb_deblocking_filter_core_full: one full 1920x1080 frame through the core
// at its default parameters (the 1080p target of the design), with clk_en
// dropped at random (1 clock in 16) to stall the pipeline. Otherwise the same
// checks as the multi-frame end-to-end test. A behavioural image memory
// answers the read addresses one enabled clock later. Every write is checked
// against the frame-level reference model (value and address), against an
// independent model of the vertical-raster scan order, and for its latency:
// 192 enabled clocks from the matching pixel_in. Each pixel must be written
// exactly once, rdy must pulse with the first write and done with the last.
// The mechanisms of the design are counted and must all occur: stalls,
// deblocking-block captures, edge-protected and smooth offset-filter lanes,
// clipping, edge-preserving replacements, pass-through and border pixels,
// and stripes that are first, middle and last of a frame.
`timescale 1ns/1ps
module tb_deblocking_filter_core_full;
  import tb_deblock_ref_pkg::*;

  localparam int MAXW = 1920, MAXH = 1080;
  localparam int XW = $clog2(MAXW + 1), YW = $clog2(MAXH + 1), AW = $clog2(MAXW * MAXH);
  localparam int LAT = 192;
  localparam int NF = 1;
  localparam int FW [NF] = '{1920};
  localparam int FH [NF] = '{1080};

  logic clk = 0, rst = 1, clk_en = 0, start = 0;
  logic [XW-1:0] fw;
  logic [YW-1:0] fh;
  logic busy, rd_en, wr_en, rdy, done;
  logic [AW-1:0] rd_addr, wr_addr;
  logic [7:0] pixel_in, pixel_out;

  deblocking_filter_core dut (
    .clk(clk), .rst(rst), .clk_en(clk_en), .start(start),
    .frame_width(fw), .frame_height(fh), .busy(busy),
    .rd_addr(rd_addr), .rd_en(rd_en), .pixel_in(pixel_in),
    .pixel_out(pixel_out), .wr_addr(wr_addr), .wr_en(wr_en), .rdy(rdy), .done(done));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int img[], expv[], wcount[];
  ref_stats_t st;
  longint ncyc = 0;                  // enabled clocks
  int     stall_frac = 16;           // clk_en low with probability 1/stall_frac

  // behavioural image memory (synchronous read)
  always_ff @(posedge clk) if (clk_en) pixel_in <= 8'(img[rd_addr]);

  // expected writes
  typedef struct { longint t; int addr; } exp_t;
  exp_t q[$];
  int rd_k, W, H;
  int n_stall = 0, n_cap = 0, n_enx = 0, n_eny = 0, n_load = 0, n_rdy = 0, n_done = 0;
  int total_clips = 0;
  int n_writes = 0, n_first = 0, n_mid = 0, n_last = 0;

  function automatic void check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL t=%0d: %s", ncyc, what);
    end
  endfunction

  always @(posedge clk) begin
    if (!rst && busy && !clk_en) n_stall++;
    if (!rst && clk_en) begin
      ncyc++;
      if (dut.cap)  n_cap++;
      if (dut.en_x) n_enx++;
      if (dut.en_y) n_eny++;
      if (dut.load) n_load++;
      if (rd_en) begin
        int s, x, r, S;
        S = H/8 - 1;
        s = rd_k / (16*W); x = (rd_k / 16) % W; r = rd_k % 16;
        check(rd_addr == AW'((8*s + r)*W + x), $sformatf("read address %0d at k=%0d", rd_addr, rd_k));
        if ((r >= 4 && r <= 11) || (s == 0 && r < 4) || (s == S-1 && r > 11)) begin
          q.push_back('{ncyc + 1 + LAT, (8*s + r)*W + x});
          if (S == 1) n_first++;
          else if (s == 0) n_first++;
          else if (s == S-1) n_last++;
          else n_mid++;
        end
        rd_k++;
      end
      if (wr_en) begin
        exp_t e;
        n_writes++;
        if (q.size() == 0) check(0, "unexpected write");
        else begin
          e = q.pop_front();
          check(ncyc == e.t, $sformatf("latency: write at %0d expected %0d", ncyc, e.t));
          check(wr_addr == AW'(e.addr), $sformatf("write address %0d expected %0d", wr_addr, e.addr));
          if (e.addr < W*H) begin
            check(pixel_out == 8'(expv[e.addr]),
                  $sformatf("pixel (%0d,%0d) = %0d expected %0d", e.addr / W, e.addr % W, pixel_out, expv[e.addr]));
            wcount[e.addr]++;
          end
        end
        if (rdy) n_rdy++;
      end else begin
        check(!rdy, "rdy without a write");
      end
      if (done) n_done++;
    end
  end

  // random clock enable
  always @(negedge clk) clk_en <= rst ? 1'b0 : ($urandom_range(0, stall_frac - 1) != 0);

  initial begin
    repeat (4) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int f = 0; f < NF; f++) begin
      W = FW[f]; H = FH[f];
      make_image(W, H, 17 + f, img);
      ref_frame(W, H, 20, 10, img, expv, st);
      wcount = new[W*H];
      rd_k = 0;
      q.delete();
      @(negedge clk);
      fw = XW'(W); fh = YW'(H);
      start = 1;
      @(posedge clk iff clk_en);
      @(negedge clk) start = 0;
      wait (!busy);
      repeat (3) @(posedge clk);
      check(q.size() == 0, $sformatf("frame %0d: %0d writes missing", f, q.size()));
      foreach (wcount[k]) check(wcount[k] == 1, $sformatf("frame %0d pixel %0d written %0d times", f, k, wcount[k]));
      $display("frame %0dx%0d: blocks=%0d smooth_lanes=%0d edge_lanes=%0d clips=%0d epf=%0d pass=%0d border=%0d",
               W, H, st.db_blocks, st.lanes_smooth, st.lanes_edge, st.clips, st.epf_pixels, st.pass_pixels, st.border_pixels);
      total_clips += st.clips;
      check(st.db_blocks > 0 && st.lanes_edge > 0 && st.lanes_smooth > 0, "offset filter mechanisms");
      check(st.epf_pixels > 0 && st.pass_pixels > 0 && st.border_pixels > 0, "edge filter mechanisms");
    end
    $display("mechanisms: stalls=%0d captures=%0d en_x=%0d en_y=%0d loads=%0d rdy=%0d done=%0d first/mid/last-stripe writes=%0d/%0d/%0d",
             n_stall, n_cap, n_enx, n_eny, n_load, n_rdy, n_done, n_first, n_mid, n_last);
    check(n_stall > 0, "no stall happened");
    check(total_clips > 0, "no offset result was clipped");
    check(n_cap > 0 && n_enx == 8*n_cap && n_eny == 8*n_cap && n_load == n_cap, "offset sequence counts");
    check(n_rdy == NF, "one rdy per frame");
    check(n_done == NF, "one done per frame");
    check(n_mid > 0 && n_first > 0 && n_last > 0, "first, middle and last stripes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (6000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
