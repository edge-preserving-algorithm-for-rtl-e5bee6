// tb_pixel_classifier: drives random and hand-made 3x3 windows (flat, vertical
// and horizontal edges, values near the thresholds) into the classifier with a
// randomly gated enable and checks Ex, Ey, Ez against the Prewitt/threshold
// equations three enabled clocks later, one window per enabled clock.
`timescale 1ns/1ps
module tb_pixel_classifier;
  logic clk = 0, rst = 1, en = 0;
  logic [7:0] win [3][3];
  logic ex, ey, ez;
  always #5 clk = ~clk;

  pixel_classifier #(.T(20), .TD(10)) dut (.clk, .rst, .en, .win, .ex, .ey, .ez);

  int checks = 0, failures = 0;
  logic [2:0] expq [$];
  int n_ex = 0, n_ey = 0, n_ez = 0, n_none = 0;

  function automatic logic [2:0] model(logic [7:0] w [3][3]);
    int gx, gy;
    gx = 0; gy = 0;
    for (int k = 0; k < 3; k++) begin
      gx += int'(w[k][2]) - int'(w[k][0]);
      gy += int'(w[2][k]) - int'(w[0][k]);
    end
    if (gx < 0) gx = -gx;
    if (gy < 0) gy = -gy;
    return {gx >= 10, gy >= 10, gx + gy >= 20};
  endfunction

  initial begin
    foreach (win[i, j]) win[i][j] = 0;
    repeat (2) expq.push_back(3'b000);
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int c = 0; c < 4000; c++) begin
      int base, kind;
      @(negedge clk);
      en   = ($urandom_range(0, 3) != 0);
      kind = $urandom_range(0, 4);
      base = $urandom_range(0, 240);
      foreach (win[i, j]) begin
        case (kind)
          0: win[i][j] = 8'($urandom);
          1: win[i][j] = 8'(base + $urandom_range(0, 3));                   // almost flat
          2: win[i][j] = 8'(base + j * $urandom_range(0, 4));               // vertical edge near Td
          3: win[i][j] = 8'(base + i * $urandom_range(0, 4));               // horizontal edge near Td
          default: win[i][j] = 8'(base + (i + j) * $urandom_range(0, 3));   // diagonal near T
        endcase
      end
      @(posedge clk);
      #1;
      if (en) begin
        logic [2:0] e;
        expq.push_back(model(win));
        e = expq.pop_front();
        checks++;
        if ({ex, ey, ez} !== e) begin
          failures++;
          if (failures < 10) $display("FAIL: got %b expected %b", {ex, ey, ez}, e);
        end
        if (e[2]) n_ex++;
        if (e[1]) n_ey++;
        if (e[0]) n_ez++;
        if (e == 0) n_none++;
      end
    end
    checks++;
    if (n_ex == 0 || n_ey == 0 || n_ez == 0 || n_none == 0) failures++;
    $display("ex=%0d ey=%0d ez=%0d smooth=%0d", n_ex, n_ey, n_ez, n_none);
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
