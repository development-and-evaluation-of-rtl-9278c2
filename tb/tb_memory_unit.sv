// tb_memory_unit: exercises every store of the memory unit through its ports
// and compares with a behavioural model: image RAM (host write, SU read),
// the five BRAMs (per-BRAM SU write addresses in PH_SEG, common read address
// in S1), the weights, the S1 maps (20 parallel writes, scaled by >>5 with
// saturation; 16 parallel window reads), the C1 values, the S2 banks (>>6
// with saturation) and the recognition code. Reads have one clock latency.
`timescale 1ns/1ps
module tb_memory_unit;
  import cnn_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic img_we = 0, w_we = 0, w_layer = 0, su_img_re = 0;
  iaddr_t img_waddr = 0, su_img_addr = 0;
  pix_t img_wdata = 0, w_data = 0, su_bram_wdata = 0, su_img_rdata, code_rdata, c1_rdata;
  logic [3:0] w_feat = 0, s1_rrow = 0, code_wpos = 0;
  logic [5:0] w_idx = 0, rd_elem = 0;
  logic [7:0] code_raddr = 0;
  logic [N_BRAM-1:0] su_port_en = 0;
  baddr_t [N_BRAM-1:0] su_bram_addr = '0;
  phase_e phase = PH_IDLE;
  baddr_t bram_raddr = 0;
  logic [1:0] s1_rcol = 0, c1_wrow = 0;
  logic [6:0] s2_raddr = 0, s2_waddr = 0;
  pix_t bram_rdata [N_BRAM];
  pix_t w1 [S1_FEAT];
  pix_t w2 [S2_FEAT];
  pix_t s1_rdata [S2_FEAT];
  pix_t s2_rdata [S2_FEAT];
  acc_t pe_res [N_PE];
  logic s1_we = 0, c1_we = 0, s2_we = 0, code_we = 0;
  logic [N_BRAM-1:0][6:0] s1_wwin = '0;

  memory_unit dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic tick();
    @(posedge clk); #1;
  endtask
  function automatic pix_t sat(input int unsigned v, input int sh);
    return ((v >> sh) > 255) ? 8'd255 : 8'(v >> sh);
  endfunction

  byte unsigned img [1024], br [5][1024], m1 [4][25], m2 [16][64];
  byte unsigned s1 [4][100], c1 [64], s2 [16][100], code [256];

  initial begin
    foreach (pe_res[i]) pe_res[i] = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    tick();
    // image RAM
    for (int i = 0; i < 1024; i++) begin
      img[i] = 8'($urandom);
      img_we = 1; img_waddr = iaddr_t'(i); img_wdata = img[i]; tick();
    end
    img_we = 0; phase = PH_SEG; su_img_re = 1;
    for (int n = 0; n < 300; n++) begin
      automatic int a = $urandom % 1024;
      su_img_addr = iaddr_t'(a); tick();
      check(su_img_rdata == img[a], "image RAM read");
    end
    su_img_re = 0;
    // BRAMs: SU writes with independent addresses and enables
    // first fill every address of every BRAM, then overwrite at random
    for (int a = 0; a < 1024; a++) begin
      su_port_en = '1;
      su_bram_wdata = 8'($urandom);
      for (int b = 0; b < 5; b++) begin
        su_bram_addr[b] = baddr_t'(a);
        br[b][a] = su_bram_wdata;
      end
      tick();
    end
    for (int n = 0; n < 3000; n++) begin
      su_port_en = 5'($urandom);
      su_bram_wdata = 8'($urandom);
      for (int b = 0; b < 5; b++) begin
        su_bram_addr[b] = baddr_t'($urandom);
        if (su_port_en[b]) br[b][su_bram_addr[b]] = su_bram_wdata;
      end
      tick();
    end
    su_port_en = 0;
    // an enable outside PH_SEG must not write
    phase = PH_S1;
    su_port_en = '1; su_bram_wdata = 8'hA5; tick(); su_port_en = 0;
    for (int n = 0; n < 1024; n++) begin
      bram_raddr = baddr_t'(n); tick();
      for (int b = 0; b < 5; b++)
        check(bram_rdata[b] == br[b][n], $sformatf("BRAM %0d address %0d", b, n));
    end
    // weights
    for (int f = 0; f < 4; f++) for (int k = 0; k < 25; k++) begin
      m1[f][k] = 8'($urandom); w_we = 1; w_layer = 0; w_feat = 4'(f); w_idx = 6'(k); w_data = m1[f][k]; tick();
    end
    for (int g = 0; g < 16; g++) for (int k = 0; k < 64; k++) begin
      m2[g][k] = 8'($urandom); w_we = 1; w_layer = 1; w_feat = 4'(g); w_idx = 6'(k); w_data = m2[g][k]; tick();
    end
    w_we = 0;
    for (int k = 0; k < 64; k++) begin
      rd_elem = 6'(k); tick();
      for (int g = 0; g < 16; g++) check(w2[g] == m2[g][k], "S2 weight");
      if (k < 25) for (int f = 0; f < 4; f++) check(w1[f] == m1[f][k], "S1 weight");
    end
    // S1 maps: 20 writes cover all windows (method-2 layout)
    for (int k = 0; k < 20; k++) begin
      for (int i = 0; i < 20; i++) pe_res[i] = acc_t'($urandom % 8000);
      for (int b = 0; b < 5; b++) begin
        s1_wwin[b] = 7'((k / 2) * 10 + 5 * (k % 2) + b);
        for (int f = 0; f < 4; f++) s1[f][s1_wwin[b]] = sat(pe_res[b * 4 + f], 5);
      end
      s1_we = 1; tick();
    end
    s1_we = 0;
    for (int r = 0; r < 4; r++)
      for (int e = 0; e < 16; e++) begin
        s1_rrow = 4'(2 * r + e / 4); s1_rcol = 2'(e % 4); tick();
        for (int i = 0; i < 16; i++)
          check(s1_rdata[i] == s1[i / 4][(2 * r + e / 4) * 10 + (i % 4) * 2 + e % 4],
                $sformatf("S1 read PE %0d row %0d col %0d", i, r, e));
      end
    // C1 values
    for (int r = 0; r < 4; r++) begin
      for (int i = 0; i < 16; i++) begin
        pe_res[i] = acc_t'($urandom % 256);
        c1[(i / 4) * 16 + r * 4 + i % 4] = pe_res[i][7:0];
      end
      c1_wrow = 2'(r); c1_we = 1; tick();
    end
    c1_we = 0;
    for (int e = 0; e < 64; e++) begin
      rd_elem = 6'(e); tick();
      check(c1_rdata == c1[e], $sformatf("C1 value %0d", e));
    end
    // S2 banks
    for (int p = 0; p < 100; p++) begin
      for (int g = 0; g < 16; g++) begin
        pe_res[g] = acc_t'($urandom % 17000);
        s2[g][p] = sat(pe_res[g], 6);
      end
      s2_waddr = 7'(p); s2_we = 1; tick();
    end
    s2_we = 0;
    for (int p = 0; p < 100; p++) begin
      s2_raddr = 7'(p); tick();
      for (int g = 0; g < 16; g++) check(s2_rdata[g] == s2[g][p], "S2 map");
    end
    // recognition code
    for (int q = 0; q < 16; q++) begin
      for (int g = 0; g < 16; g++) begin
        pe_res[g] = acc_t'($urandom % 256);
        code[g * 16 + q] = pe_res[g][7:0];
      end
      code_wpos = 4'(q); code_we = 1; tick();
    end
    code_we = 0;
    for (int a = 0; a < 256; a++) begin
      code_raddr = 8'(a); tick();
      check(code_rdata == code[a], "code");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
