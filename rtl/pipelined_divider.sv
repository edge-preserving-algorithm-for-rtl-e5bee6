// pipelined_divider: unsigned A / B restoring divider spread over STAGES
// pipeline stages.
//
// The quotient is known to fit in QW bits (A < 2^QW * B); each stage decides
// QW/STAGES quotient bits, most significant first, by comparing the running
// remainder with B shifted left by the bit position and subtracting when it
// fits. The result is the floor of A / B. One division is accepted per
// enabled clock; q is valid STAGES enabled clocks after a and b were
// presented. B must not be zero. The restoring scheme and the even split of
// bits over stages are this implementation's choices; the stage count (4 for
// the edge-preserving filter) is the design's.
module pipelined_divider #(
  parameter int AW     = 20,
  parameter int BW     = 12,
  parameter int QW     = 8,
  parameter int STAGES = 4
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          en,
  input  logic [AW-1:0] a,
  input  logic [BW-1:0] b,
  output logic [QW-1:0] q
);
  localparam int BPS = QW / STAGES;    // quotient bits per stage
  localparam int RW  = AW + 1;

  logic [RW-1:0] rem_q [STAGES];
  logic [BW-1:0] b_q   [STAGES];
  logic [QW-1:0] q_q   [STAGES];

  for (genvar s = 0; s < STAGES; s++) begin : g_stage
    logic [RW-1:0] rem_in, rem_out;
    logic [BW-1:0] b_in;
    logic [QW-1:0] q_in, q_out;
    if (s == 0) begin : g_first
      assign rem_in = RW'(a);
      assign b_in   = b;
      assign q_in   = '0;
    end else begin : g_next
      assign rem_in = rem_q[s-1];
      assign b_in   = b_q[s-1];
      assign q_in   = q_q[s-1];
    end
    always_comb begin
      logic [RW+QW-1:0] dsh;
      rem_out = rem_in;
      q_out   = q_in;
      for (int k = 0; k < BPS; k++) begin
        dsh = (RW+QW)'(b_in) << (QW - 1 - s*BPS - k);
        if ((RW+QW)'(rem_out) >= dsh) begin
          rem_out = rem_out - RW'(dsh);
          q_out[QW - 1 - s*BPS - k] = 1'b1;
        end
      end
    end
    always_ff @(posedge clk) begin
      if (rst) begin
        rem_q[s] <= '0;
        b_q[s]   <= '0;
        q_q[s]   <= '0;
      end else if (en) begin
        rem_q[s] <= rem_out;
        b_q[s]   <= b_in;
        q_q[s]   <= q_out;
      end
    end
  end

  assign q = q_q[STAGES-1];
endmodule
