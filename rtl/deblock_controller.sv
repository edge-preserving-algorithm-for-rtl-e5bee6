// deblock_controller: control unit of the deblocking filter core.
//
// The core is a fixed-latency pipeline, so control is a matter of knowing
// which frame position each pipeline point holds. Three vertical-raster scan
// counters run the same scan, started D_A and D_W enabled clocks apart:
//   read side  - read address and read enable for the image memory;
//   aligned    - position of the pixel entering the 8x8 block buffers, which
//                is also the pixel whose edge bits leave the classifier;
//   write side - position of the pixel leaving the edge-preserving filter.
// From the aligned position the controller raises cap when an 8x8 deblocking
// block (rows 4..11 of the stripe, columns 8c+4..8c+11, inside the frame) is
// complete in the block buffer, then steps a 19-clock sequence: en_x (ENx)
// for 8 clocks (horizontal filter rows), en_y (ENy) for 8 clocks (vertical
// filter columns) and load, which puts the filtered block back into the
// stream. en_z (ENz) is high for pixels whose 3x3 neighbourhood lies inside
// the frame; the outer ring of the frame is never edge-filtered. From the
// write-side position it raises wr_en for the rows the current stripe owns:
// rows 4..11 of every stripe, plus rows 0..3 in the first stripe and rows
// 12..15 in the last. first_out marks the first write of a frame, done the
// last. start is taken only when idle; width and height are sampled then.
// Everything advances only on enabled clocks. The enable names follow the
// design; the three-counter structure is this implementation's choice.
module deblock_controller #(
  parameter int MAX_WIDTH  = 1920,
  parameter int MAX_HEIGHT = 1080,
  parameter int D_A = 22,      // read start -> aligned-stream start
  parameter int D_W = 192,     // read start -> write start
  parameter int XW = $clog2(MAX_WIDTH + 1),
  parameter int YW = $clog2(MAX_HEIGHT + 1),
  parameter int AW = $clog2(MAX_WIDTH * MAX_HEIGHT)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          en,
  input  logic          start,
  input  logic [XW-1:0] width,
  input  logic [YW-1:0] height,
  output logic          busy,
  output logic [AW-1:0] rd_addr,
  output logic          rd_en,
  output logic          en_z,
  output logic          cap,
  output logic          en_x,
  output logic          en_y,
  output logic          load,
  output logic [AW-1:0] wr_addr,
  output logic          wr_en,
  output logic          first_out,
  output logic          done
);
  localparam int CW = $clog2(D_W + 2);

  logic [CW-1:0] cnt;
  logic [XW-1:0] w_q;
  logic [YW-1:0] h_q;
  logic          go, go_a, go_w;
  logic          started_out;
  logic [4:0]    ph;

  // read side
  logic          r_last;
  logic [YW-4:0] r_stripe, r_ns;
  logic [XW-1:0] r_col;
  logic [3:0]    r_row;
  // aligned side
  logic          a_act, a_last;
  logic [YW-4:0] a_stripe, a_ns;
  logic [XW-1:0] a_col;
  logic [3:0]    a_row;
  logic [AW-1:0] a_addr;
  // write side
  logic          w_act, w_last;
  logic [YW-4:0] w_stripe, w_ns;
  logic [XW-1:0] w_col;
  logic [3:0]    w_row;

  assign go   = start && !busy;
  assign go_a = busy && (cnt == CW'(D_A));
  assign go_w = busy && (cnt == CW'(D_W));

  address_generator #(.MAX_WIDTH(MAX_WIDTH), .MAX_HEIGHT(MAX_HEIGHT)) u_rd (
    .clk(clk), .rst(rst), .en(en), .start(go), .width(width), .height(height),
    .active(rd_en), .stripe(r_stripe), .col(r_col), .row(r_row), .addr(rd_addr),
    .last(r_last), .num_stripes(r_ns));

  address_generator #(.MAX_WIDTH(MAX_WIDTH), .MAX_HEIGHT(MAX_HEIGHT)) u_al (
    .clk(clk), .rst(rst), .en(en), .start(go_a), .width(w_q), .height(h_q),
    .active(a_act), .stripe(a_stripe), .col(a_col), .row(a_row), .addr(a_addr),
    .last(a_last), .num_stripes(a_ns));

  address_generator #(.MAX_WIDTH(MAX_WIDTH), .MAX_HEIGHT(MAX_HEIGHT)) u_wr (
    .clk(clk), .rst(rst), .en(en), .start(go_w), .width(w_q), .height(h_q),
    .active(w_act), .stripe(w_stripe), .col(w_col), .row(w_row), .addr(wr_addr),
    .last(w_last), .num_stripes(w_ns));

  // aligned side decodes
  logic [YW-1:0] a_frow;
  logic          db_corner;
  assign a_frow    = YW'({a_stripe, 3'b000}) + YW'(a_row);
  assign en_z      = a_act && (a_frow != '0) && (a_frow != h_q - 1'b1)
                     && (a_col != '0) && (a_col != w_q - 1'b1);
  assign db_corner = a_act && (a_row == 4'd11) && (a_col[2:0] == 3'd3)
                     && (a_col >= XW'(11)) && (a_col <= w_q - XW'(5));

  assign en_x = (ph >= 5'd1)  && (ph <= 5'd8);
  assign en_y = (ph >= 5'd10) && (ph <= 5'd17);
  assign load = (ph == 5'd19);

  // write side decodes
  assign wr_en = w_act && (((w_row >= 4'd4) && (w_row <= 4'd11))
                        || ((w_stripe == '0) && (w_row < 4'd4))
                        || ((w_stripe == w_ns - 1'b1) && (w_row > 4'd11)));
  assign first_out = wr_en && !started_out;
  assign done      = w_last;

  always_ff @(posedge clk) begin
    if (rst) begin
      busy        <= 1'b0;
      cnt         <= '0;
      w_q         <= '0;
      h_q         <= '0;
      cap         <= 1'b0;
      ph          <= '0;
      started_out <= 1'b0;
    end else if (en) begin
      if (go) begin
        busy        <= 1'b1;
        cnt         <= CW'(1);
        w_q         <= width;
        h_q         <= height;
        started_out <= 1'b0;
      end else begin
        if (busy && cnt <= CW'(D_W)) cnt <= cnt + 1'b1;
        if (w_last) busy <= 1'b0;
        if (wr_en) started_out <= 1'b1;
      end
      cap <= db_corner;
      if (cap)                   ph <= 5'd1;
      else if (ph == 5'd19)      ph <= '0;
      else if (ph != '0)         ph <= ph + 1'b1;
    end
  end

  // Frame sizes must be multiples of 8 and at least 16 (two block rows).
  assert property (@(posedge clk) disable iff (rst) (en && go) |->
                   (width[2:0] == 3'd0 && height[2:0] == 3'd0 && width >= XW'(16) && height >= YW'(16)
                    && width <= XW'(MAX_WIDTH) && height <= YW'(MAX_HEIGHT)))
    else $error("deblock_controller: unsupported frame size %0d x %0d", width, height);

  // A new deblocking block never arrives while the previous one is in flight.
  assert property (@(posedge clk) disable iff (rst) (en && cap) |-> (ph == '0))
    else $error("deblock_controller: deblocking block overlaps the previous one");
endmodule
