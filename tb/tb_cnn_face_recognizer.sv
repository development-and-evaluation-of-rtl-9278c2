// tb_cnn_face_recognizer: end-to-end test of cnn_face_recognizer at its default parameters
// (second, parallel segmentation method).
// It loads a random 32x32 image and random S1/S2 weights through the host
// ports, runs one complete recognition and compares all 256 bytes of the
// recognition code with cnn_ref_pkg, and a sample of the S2 maps. It also
// checks the number of image RAM reads per image (90000, the read count of
// this segmentation method), counts the mechanisms of the design (parallel
// multi-BRAM writes, single-BRAM writes, each layer phase, the per-field S2
// completion flag) and fails any that never happened, and checks the total
// clock count against the published image time (158500 clocks at
// 50 MHz) within 5 %. A second image is then recognised with the same
// weights to check that a new start leaves nothing of the first run behind.
`timescale 1ns/1ps
module tb_cnn_face_recognizer;
  import cnn_pkg::*;
  import cnn_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       img_we = 0, w_we = 0, w_layer = 0, start = 0;
  iaddr_t     img_waddr = '0;
  pix_t       img_wdata = '0, w_data = '0;
  logic [3:0] w_feat = '0;
  logic [5:0] w_idx = '0;
  logic [7:0] code_raddr = '0;
  logic       busy, done, s2_flag;
  pix_t       code_rdata;

  cnn_face_recognizer dut (
    .clk, .rst_n, .img_we, .img_waddr, .img_wdata, .w_we, .w_layer, .w_feat, .w_idx,
    .w_data, .start, .busy, .done, .one_simp2_end_flag(s2_flag), .code_raddr, .code_rdata
  );

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // watchdog
  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  longint cyc = 0, img_reads = 0, multi_wr = 0, five_wr = 0, single_wr = 0, s2_flags = 0;
  longint ph_cnt [6];
  phase_e ph_prev = PH_IDLE;
  bit counting = 0;
  always @(posedge clk) if (counting) begin
    cyc++;
    if (dut.su_img_re) img_reads++;
    if ($countones(dut.su_port_en) > 1) multi_wr++;
    if ($countones(dut.su_port_en) == 5) five_wr++;
    if ($countones(dut.su_port_en) == 1) single_wr++;
    if (s2_flag) s2_flags++;
    if (dut.phase != ph_prev) ph_cnt[dut.phase]++;
    ph_prev <= dut.phase;
  end

  img_t  img;
  w1_t   w1;
  w2_t   w2;
  s2_t   s2_ref;
  code_t code_ref;

  initial begin
    for (int i = 0; i < 6; i++) ph_cnt[i] = 0;
    for (int i = 0; i < 1024; i++) img[i] = 8'($urandom);
    for (int f = 0; f < 4; f++) for (int k = 0; k < 25; k++) w1[f][k] = 8'($urandom);
    for (int g = 0; g < 16; g++) for (int k = 0; k < 64; k++) w2[g][k] = 8'($urandom);
    recognize(img, w1, w2, s2_ref, code_ref);

    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int i = 0; i < 1024; i++) begin
      img_we <= 1; img_waddr <= iaddr_t'(i); img_wdata <= img[i];
      @(posedge clk);
    end
    img_we <= 0;
    for (int f = 0; f < 4; f++) for (int k = 0; k < 25; k++) begin
      w_we <= 1; w_layer <= 0; w_feat <= 4'(f); w_idx <= 6'(k); w_data <= w1[f][k];
      @(posedge clk);
    end
    for (int g = 0; g < 16; g++) for (int k = 0; k < 64; k++) begin
      w_we <= 1; w_layer <= 1; w_feat <= 4'(g); w_idx <= 6'(k); w_data <= w2[g][k];
      @(posedge clk);
    end
    w_we <= 0;
    @(posedge clk);
    check(!busy, "idle before start");

    start <= 1; counting = 1;
    @(posedge clk);
    start <= 0;
    @(posedge clk);
    check(busy, "busy after start");
    while (!done) @(posedge clk);
    counting = 0;
    @(posedge clk);
    check(!busy, "idle after done");

    // recognition code
    for (int a = 0; a < 256; a++) begin
      code_raddr <= 8'(a);
      @(posedge clk); #1;
      check(code_rdata == pix_t'(code_ref[a]),
            $sformatf("code[%0d] = %0d, expected %0d", a, code_rdata, code_ref[a]));
    end
    // S2 maps (every last-layer simple cell)
    for (int g = 0; g < 16; g++)
      for (int p = 0; p < 100; p++)
        check(dut.u_mu.s2_map[g][p] == pix_t'(s2_ref[g][p]),
              $sformatf("s2[%0d][%0d] = %0d, expected %0d", g, p, dut.u_mu.s2_map[g][p], s2_ref[g][p]));

    // bandwidth and timing
    $display("image RAM reads %0d, clocks %0d (published %0d), S2 flags %0d",
             img_reads, cyc, 158500, s2_flags);
    check(img_reads == 90000, $sformatf("image RAM reads %0d, expected 90000", img_reads));
    check(s2_flags == 100, "one S2 completion per large field");
    check(cyc * 100 > 158500 * 95 && cyc * 100 < 158500 * 105,
          $sformatf("total clocks %0d not within 5 %% of %0d", cyc, 158500));

    // mechanisms
    $display("mechanisms: multi-BRAM writes %0d, five-BRAM writes %0d, single-BRAM writes %0d",
             multi_wr, five_wr, single_wr);
    $display("phases entered: SEG %0d S1 %0d C1 %0d S2 %0d C2 %0d",
             ph_cnt[PH_SEG], ph_cnt[PH_S1], ph_cnt[PH_C1], ph_cnt[PH_S2], ph_cnt[PH_C2]);
    check(five_wr == 10000, $sformatf("pixels written to all five BRAMs: %0d, expected 10000", five_wr));
    check(multi_wr > 0, "parallel multi-BRAM write never happened");
    check(single_wr > 0, "single-BRAM write never happened");
    check(ph_cnt[PH_SEG] == 100, "segmentation once per large field");
    check(ph_cnt[PH_S1] == 100 && ph_cnt[PH_C1] == 100 && ph_cnt[PH_S2] == 100,
          "S1, C1, S2 once per large field");
    check(ph_cnt[PH_C2] == 1, "C2 once per image");

    // second image back to back with the same weights: restart from idle
    for (int i = 0; i < 1024; i++) img[i] = 8'($urandom);
    recognize(img, w1, w2, s2_ref, code_ref);
    for (int i = 0; i < 1024; i++) begin
      img_we <= 1; img_waddr <= iaddr_t'(i); img_wdata <= img[i];
      @(posedge clk);
    end
    img_we <= 0;
    start <= 1;
    @(posedge clk);
    start <= 0;
    while (!done) @(posedge clk);
    @(posedge clk);
    for (int a = 0; a < 256; a++) begin
      code_raddr <= 8'(a);
      @(posedge clk); #1;
      check(code_rdata == pix_t'(code_ref[a]),
            $sformatf("second image code[%0d] = %0d, expected %0d", a, code_rdata, code_ref[a]));
    end
    check(ph_cnt[PH_C2] == 1, "no counting outside the first image");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
