// address_generator: vertical-raster scan counter (FSM).
//
// The frame is read in stripes of STRIPE = 16 rows. Inside a stripe the scan
// goes column by column from left to right, and each column from top to
// bottom, so an 8x8 or 3x3 window can be formed with FIFOs of a few words
// instead of whole image lines. Successive stripes start STEP = 8 rows apart
// and overlap by 8 rows, so that every horizontal block boundary lies in the
// middle of one stripe; there are height/8 - 1 stripes. The overlap and the
// step of 8 are this implementation's reading of the design's 16-row scan
// and of its 2 clock cycles per pixel.
//
// Interface: width and height (multiples of 8, at least 16, at most
// MAX_WIDTH x MAX_HEIGHT) are sampled on start while idle. From the next
// clock on, one position per enabled clock: active is high, stripe, col and
// row give the position (row inside the stripe, 0..15) and addr the linear
// address (8*stripe + row) * width + col. last marks the final position;
// the FSM then returns to idle. The same module makes the read addresses of
// the image memory and, delayed, the write addresses of the output.
module address_generator #(
  parameter int MAX_WIDTH  = 1920,
  parameter int MAX_HEIGHT = 1080,
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
  output logic          active,
  output logic [YW-4:0] stripe,
  output logic [XW-1:0] col,
  output logic [3:0]    row,
  output logic [AW-1:0] addr,
  output logic          last,
  output logic [YW-4:0] num_stripes
);
  typedef enum logic {S_IDLE, S_SCAN} state_t;
  state_t state;

  logic [XW-1:0] w_q;
  logic [AW-1:0] col_base;      // address of (8*stripe, col)
  logic [AW-1:0] stripe_base;   // address of (8*stripe, 0)

  assign active = (state == S_SCAN);
  assign last   = active && (row == 4'd15) && (col == w_q - 1'b1)
                  && (stripe == num_stripes - 1'b1);

  always_ff @(posedge clk) begin
    if (rst) begin
      state       <= S_IDLE;
      w_q         <= '0;
      num_stripes <= '0;
      stripe      <= '0;
      col         <= '0;
      row         <= '0;
      addr        <= '0;
      col_base    <= '0;
      stripe_base <= '0;
    end else if (en) begin
      case (state)
        S_IDLE: if (start) begin
          state       <= S_SCAN;
          w_q         <= width;
          num_stripes <= (YW-3)'(height[YW-1:3] - 1'b1);
          stripe      <= '0;
          col         <= '0;
          row         <= '0;
          addr        <= '0;
          col_base    <= '0;
          stripe_base <= '0;
        end
        S_SCAN: begin
          if (row != 4'd15) begin
            row  <= row + 1'b1;
            addr <= addr + AW'(w_q);
          end else begin
            row <= '0;
            if (col != w_q - 1'b1) begin
              col      <= col + 1'b1;
              col_base <= col_base + 1'b1;
              addr     <= col_base + 1'b1;
            end else if (stripe != num_stripes - 1'b1) begin
              col         <= '0;
              stripe      <= stripe + 1'b1;
              stripe_base <= stripe_base + (AW'(w_q) << 3);
              col_base    <= stripe_base + (AW'(w_q) << 3);
              addr        <= stripe_base + (AW'(w_q) << 3);
            end else begin
              state <= S_IDLE;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
