// tb_pe: checks the processing element on random vectors of random length in
// both modes: Manhattan distance (sum |a-w|) and window minimum, including
// back-to-back vectors, gaps with `en` low, and the one-clock res_valid.
`timescale 1ns/1ps
module tb_pe;
  import cnn_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic en = 0, first = 0, last = 0;
  pe_mode_e mode = PE_DIST;
  pix_t a = 0, w = 0;
  acc_t acc;
  logic res_valid;

  pe dut (.clk, .rst_n, .en, .first, .last, .mode, .a, .w, .acc, .res_valid);

  int checks = 0, failures = 0;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int v = 0; v < 200; v++) begin
      automatic int n = 1 + ($urandom % 64);
      int unsigned exp;
      automatic pe_mode_e m = pe_mode_e'(v % 2);
      exp = (m == PE_DIST) ? 0 : 255;
      for (int k = 0; k < n; k++) begin
        automatic pix_t x = 8'($urandom), y = 8'($urandom);
        if (m == PE_DIST) exp += (x > y) ? x - y : y - x;
        else if (x < exp) exp = x;
        en <= 1; first <= (k == 0); last <= (k == n - 1); mode <= m; a <= x; w <= y;
        @(posedge clk);
        if (k != n - 1 && $urandom % 4 == 0) begin   // idle clock inside the vector
          en <= 0; first <= 0; last <= 0; a <= 8'($urandom);
          @(posedge clk); #1;
          checks++;
          if (res_valid) begin failures++; $display("FAIL: early res_valid"); end
        end
      end
      en <= 0; first <= 0; last <= 0;
      #1;
      checks++;
      if (!res_valid || acc != acc_t'(exp)) begin
        failures++;
        $display("FAIL: vector %0d mode %0d n %0d: acc %0d valid %0d, expected %0d",
                 v, m, n, acc, res_valid, exp);
      end
      @(posedge clk); #1;
      checks++;
      if (res_valid || acc != acc_t'(exp)) begin
        failures++; $display("FAIL: result not held / valid not a pulse");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
