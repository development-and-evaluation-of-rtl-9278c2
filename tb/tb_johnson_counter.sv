// tb_johnson_counter: checks the 5-bit twisted ring counter against the
// expected ten-state sequence, the period of 2*W, `init` (loads 00001, takes
// priority over `en`), `clr` and hold when not enabled.
`timescale 1ns/1ps
module tb_johnson_counter;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic clr = 0, init = 0, en = 0;
  logic [4:0] q;

  johnson_counter dut (.clk, .rst_n, .clr, .init, .en, .q);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam logic [4:0] SEQ [10] = '{5'b00000, 5'b00001, 5'b00011, 5'b00111, 5'b01111,
                                      5'b11111, 5'b11110, 5'b11100, 5'b11000, 5'b10000};
  initial begin
    repeat (2) @(posedge clk);
    #1 check(q == 5'b0, "reset state");
    rst_n <= 1;
    en <= 1;
    for (int i = 1; i <= 30; i++) begin
      @(posedge clk); #1;
      check(q == SEQ[i % 10], $sformatf("step %0d: %b expected %b", i, q, SEQ[i % 10]));
    end
    en <= 0;
    repeat (3) @(posedge clk);
    #1 check(q == SEQ[0], "hold");
    // column pattern of one group of the segmentation: windows b <= t <= b+4
    init <= 1; en <= 1;
    @(posedge clk); init <= 0;
    for (int t = 0; t < 9; t++) begin
      logic [4:0] exp;
      #1;
      for (int b = 0; b < 5; b++) exp[b] = (b <= t) && (t <= b + 4);
      check(q == exp, $sformatf("column %0d: %b expected %b", t, q, exp));
      @(posedge clk);
    end
    init <= 1; en <= 1;
    @(posedge clk); #1 check(q == 5'b00001, "init has priority over en");
    init <= 0; clr <= 1;
    @(posedge clk); #1 check(q == 5'b0, "clr");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
