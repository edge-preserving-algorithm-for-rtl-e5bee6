// tb_delay_fifo: checks that delay_fifo delays a stream by exactly DEPTH
// enabled clocks, for depths 0, 1, 8 and 13, with a randomly gated enable.
// Outputs before DEPTH words have entered must be the reset value 0.
`timescale 1ns/1ps
module tb_delay_fifo;
  logic clk = 0, rst = 1, en = 0;
  logic [7:0] din;
  logic [7:0] d0, d1, d8, d13;
  always #5 clk = ~clk;

  delay_fifo #(.WIDTH(8), .DEPTH(0))  u0  (.clk, .rst, .en, .din, .dout(d0));
  delay_fifo #(.WIDTH(8), .DEPTH(1))  u1  (.clk, .rst, .en, .din, .dout(d1));
  delay_fifo #(.WIDTH(8), .DEPTH(8))  u8  (.clk, .rst, .en, .din, .dout(d8));
  delay_fifo #(.WIDTH(8), .DEPTH(13)) u13 (.clk, .rst, .en, .din, .dout(d13));

  int checks = 0, failures = 0;
  logic [7:0] hist[$];

  function automatic logic [7:0] past(int d);
    return (hist.size() >= d) ? hist[hist.size() - d] : 8'd0;
  endfunction

  task automatic chk(logic [7:0] got, logic [7:0] exp, int d);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL depth %0d: got %0d expected %0d", d, got, exp);
    end
  endtask

  initial begin
    din = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int n = 0; n < 600; n++) begin
      @(negedge clk);
      en  = ($urandom_range(0, 3) != 0);
      din = 8'($urandom);
      chk(d0, din, 0);
      chk(d1, past(1), 1);
      chk(d8, past(8), 8);
      chk(d13, past(13), 13);
      @(posedge clk);
      if (en) hist.push_back(din);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
