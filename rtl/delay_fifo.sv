// delay_fifo: fixed-length FIFO delay line.
//
// Every enabled clock one word is written and the word written DEPTH enabled
// clocks earlier appears at dout, so the unit delays a stream by exactly DEPTH
// enabled cycles. It is the "Delay" unit that keeps the pipeline stages of the
// deblocking core in step, and the FIFO(8)/FIFO(13) and FIFO(7)/FIFO(11)
// elements of the block buffers and the edge-preserving filter. It is built as
// a circular buffer with one pointer: the slot being overwritten holds the
// oldest word, which is the output. DEPTH = 0 is a plain wire. The storage is
// cleared by reset so that no stale value leaves the unit (a design choice).
module delay_fifo #(
  parameter int WIDTH = 8,
  parameter int DEPTH = 8
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             en,
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] dout
);
  if (DEPTH == 0) begin : g_wire
    assign dout = din;
  end else if (DEPTH == 1) begin : g_reg
    logic [WIDTH-1:0] q;
    always_ff @(posedge clk) begin
      if (rst)     q <= '0;
      else if (en) q <= din;
    end
    assign dout = q;
  end else begin : g_ring
    localparam int PW = $clog2(DEPTH);
    logic [WIDTH-1:0] mem [DEPTH];
    logic [PW-1:0]    ptr;
    always_ff @(posedge clk) begin
      if (rst) begin
        ptr <= '0;
        for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
      end else if (en) begin
        mem[ptr] <= din;
        ptr      <= (ptr == PW'(DEPTH - 1)) ? '0 : ptr + 1'b1;
      end
    end
    assign dout = mem[ptr];
  end
endmodule
