// pixel_classifier: Prewitt edge detector and thresholding unit.
//
// For the 3x3 window around a pixel the Prewitt operator gives the horizontal
// gradient Gx (right column minus left column) and the vertical gradient Gy
// (bottom row minus top row). The edge strength is G = |Gx| + |Gy|. Three
// binary edge-protection bits are produced: ex = |Gx| >= TD, ey = |Gy| >= TD
// and ez = G >= T (1 = edge region, 0 = smooth region). The design uses
// T = 20 and TD = 10.
//
// Timing: a 3-stage pipeline that accepts one window per enabled clock. Stage 1
// registers Gx and Gy (Prewitt operator), stage 2 registers |Gx| and |Gy|,
// stage 3 registers the three bits after the adder and the comparators. The
// bits for the window presented in enabled cycle c are valid after the third
// enabled clock. The split of abs, add and thresholds over stages 2 and 3 is
// this implementation's choice; the stage count is the design's.
module pixel_classifier
  import deblock_pkg::*;
#(
  parameter int T  = 20,
  parameter int TD = 10
) (
  input  logic clk,
  input  logic rst,
  input  logic en,
  input  pix_t win [3][3],
  output logic ex,
  output logic ey,
  output logic ez
);
  logic signed [10:0] gx_q, gy_q;
  logic        [9:0]  agx_q, agy_q;

  function automatic logic [9:0] abs11(input logic signed [10:0] v);
    logic [10:0] m;
    m = (v < 0) ? 11'(-v) : 11'(v);
    return m[9:0];
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      gx_q  <= '0;
      gy_q  <= '0;
      agx_q <= '0;
      agy_q <= '0;
      ex    <= 1'b0;
      ey    <= 1'b0;
      ez    <= 1'b0;
    end else if (en) begin
      // stage 1: Prewitt 3x3
      gx_q <= 11'(signed'({3'b0, win[0][2]})) + 11'(signed'({3'b0, win[1][2]}))
            + 11'(signed'({3'b0, win[2][2]})) - 11'(signed'({3'b0, win[0][0]}))
            - 11'(signed'({3'b0, win[1][0]})) - 11'(signed'({3'b0, win[2][0]}));
      gy_q <= 11'(signed'({3'b0, win[2][0]})) + 11'(signed'({3'b0, win[2][1]}))
            + 11'(signed'({3'b0, win[2][2]})) - 11'(signed'({3'b0, win[0][0]}))
            - 11'(signed'({3'b0, win[0][1]})) - 11'(signed'({3'b0, win[0][2]}));
      // stage 2: absolute values
      agx_q <= abs11(gx_q);
      agy_q <= abs11(gy_q);
      // stage 3: edge strength and thresholds
      ex <= (agx_q >= 10'(TD));
      ey <= (agy_q >= 10'(TD));
      ez <= ({1'b0, agx_q} + {1'b0, agy_q} >= 11'(T));
    end
  end
endmodule
