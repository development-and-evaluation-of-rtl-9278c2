// tb_weight_store: loads random S1 and S2 weights through the write port and
// reads every element index back, checking all 4 S1 and 16 S2 outputs of
// each read (one clock latency), and that S1 reads beyond 24 give zero.
`timescale 1ns/1ps
module tb_weight_store;
  import cnn_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic we = 0, layer = 0;
  logic [3:0] feat = 0;
  logic [5:0] idx = 0, ridx = 0;
  pix_t wdata = 0;
  pix_t w1 [S1_FEAT];
  pix_t w2 [S2_FEAT];
  byte unsigned m1 [4][25];
  byte unsigned m2 [16][64];

  weight_store dut (.clk, .we, .layer, .feat, .idx, .wdata, .ridx, .w1, .w2);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    @(posedge clk);
    for (int f = 0; f < 4; f++) for (int k = 0; k < 25; k++) begin
      m1[f][k] = 8'($urandom);
      we <= 1; layer <= 0; feat <= 4'(f); idx <= 6'(k); wdata <= m1[f][k];
      @(posedge clk);
    end
    for (int g = 0; g < 16; g++) for (int k = 0; k < 64; k++) begin
      m2[g][k] = 8'($urandom);
      we <= 1; layer <= 1; feat <= 4'(g); idx <= 6'(k); wdata <= m2[g][k];
      @(posedge clk);
    end
    we <= 0;
    for (int r = 0; r < 2; r++)
      for (int k = 0; k < 64; k++) begin
        ridx <= 6'(k);
        @(posedge clk); #1;
        for (int f = 0; f < 4; f++)
          check(w1[f] == ((k < 25) ? m1[f][k] : 8'd0),
                $sformatf("w1[%0d][%0d] = %0d", f, k, w1[f]));
        for (int g = 0; g < 16; g++)
          check(w2[g] == m2[g][k], $sformatf("w2[%0d][%0d] = %0d expected %0d", g, k, w2[g], m2[g][k]));
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
