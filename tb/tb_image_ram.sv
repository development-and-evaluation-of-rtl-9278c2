// tb_image_ram: writes random bytes to every address of the image_ram, reads them
// back in random order and checks the one-clock read latency, then checks
// that a write followed by reads elsewhere leaves other words unchanged.
`timescale 1ns/1ps
module tb_image_ram;
  import cnn_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic we = 0;
  logic [9:0] addr = 0;
  pix_t wdata = 0, rdata;
  pix_t model [1024];

  image_ram dut (.clk, .we, .addr, .wdata, .rdata);

  int checks = 0, failures = 0;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    @(posedge clk);
    for (int i = 0; i < 1024; i++) begin
      model[i] = 8'($urandom);
      we <= 1; addr <= 10'(i); wdata <= model[i];
      @(posedge clk);
    end
    we <= 0;
    for (int n = 0; n < 3000; n++) begin
      automatic int i = $urandom % 1024;
      if (n % 7 == 3) begin
        model[i] = 8'($urandom);
        we <= 1; addr <= 10'(i); wdata <= model[i];
        @(posedge clk);
        we <= 0;
      end else begin
        addr <= 10'(i);
        @(posedge clk); #1;
        checks++;
        if (rdata != model[i]) begin
          failures++;
          $display("FAIL: addr %0d read %0d expected %0d", i, rdata, model[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
