// tb_seg_unit_m2: checks the second (parallel) segmentation method: BRAM b holds the small fields of columns b and b+5, partition 2*row + column/5, and one image read may be written to up to five BRAMs at once.
// A behavioural single-port image RAM (one clock read latency) and five
// behavioural 1 KiB BRAMs surround the unit. For several large fields (the
// four corners and random ones) the test checks that every pixel of all 100
// small field vectors sits at partition*32 + 5*row + column of its BRAM,
// that the unit reads the image RAM exactly 900 times per large field,
// that done arrives 900+1 clocks after start, and that no write goes
// outside the 25 used bytes of a partition.
`timescale 1ns/1ps
module tb_seg_unit_m2;
  import cnn_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0;
  logic [3:0] lrf_y = 0, lrf_x = 0;
  logic busy, done, img_re;
  iaddr_t img_addr;
  pix_t img_rdata, bram_wdata;
  logic [N_BRAM-1:0] port_en;
  baddr_t [N_BRAM-1:0] bram_addr;

  seg_unit_m2 dut (.clk, .rst_n, .start, .lrf_y, .lrf_x, .busy, .done, .img_re,
                   .img_addr, .img_rdata, .port_en, .bram_addr, .bram_wdata);

  byte unsigned img [1024];
  byte unsigned bram [5][1024];
  always_ff @(posedge clk) img_rdata <= img[img_addr];

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int reads = 0, five = 0, max_en = 0, bad_addr = 0;
  always @(posedge clk) if (rst_n) begin
    if (img_re) reads++;
    if ($countones(port_en) == 5) five++;
    if ($countones(port_en) > max_en) max_en = $countones(port_en);
    for (int b = 0; b < 5; b++) if (port_en[b]) begin
      if (bram_addr[b] % 32 >= 25) bad_addr++;
      bram[b][bram_addr[b]] = bram_wdata;
    end
  end

  initial begin
    for (int i = 0; i < 1024; i++) img[i] = 8'($urandom);
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int n = 0; n < 8; n++) begin
      int ly, lx, lat;
      case (n)
        0: begin ly = 0; lx = 0; end
        1: begin ly = 0; lx = 9; end
        2: begin ly = 9; lx = 0; end
        3: begin ly = 9; lx = 9; end
        default: begin ly = $urandom % 10; lx = $urandom % 10; end
      endcase
      for (int b = 0; b < 5; b++) for (int a = 0; a < 1024; a++) bram[b][a] = 8'hxx;
      reads = 0; five = 0;
      lrf_y <= 4'(ly); lrf_x <= 4'(lx); start <= 1;
      @(posedge clk);
      start <= 0;
      lat = 0;
      do begin @(posedge clk); lat++; end while (!done);
      @(posedge clk);
      check(lat == 900 + 1, $sformatf("field (%0d,%0d): done after %0d clocks", ly, lx, lat));
      check(reads == 900, $sformatf("field (%0d,%0d): %0d image reads", ly, lx, reads));
      check(!busy, "idle after done");
      check(five == 100, $sformatf("five-BRAM writes %0d, expected 100", five));
      for (int sy = 0; sy < 10; sy++)
        for (int sx = 0; sx < 10; sx++) begin
          int v, b, slot;
          v = sy * 10 + sx;
          b = sx % 5; slot = sy * 2 + sx / 5;
          for (int py = 0; py < 5; py++)
            for (int px = 0; px < 5; px++)
              check(bram[b][slot * 32 + py * 5 + px] ==
                    img[(2 * ly + sy + py) * 32 + 2 * lx + sx + px],
                    $sformatf("field (%0d,%0d) window (%0d,%0d) pixel (%0d,%0d)",
                              ly, lx, sy, sx, py, px));
        end
    end
    check(bad_addr == 0, "write outside the 25 bytes of a partition");
    check(max_en >= 1, "no BRAM written");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
