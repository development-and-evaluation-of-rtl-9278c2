// tb_pe_array: drives the PE array with random operands in each layer phase
// and checks all 20 results against a model of the operand routing:
// S1 = distance of BRAM b's pixel stream to S1 weight f for PE 4b+f; C1 =
// minimum of S1 read i for PE i; S2 = distance of the broadcast C1 value to
// S2 weight g; C2 = minimum of S2 map g. PEs 16..19 must hold their value in
// C1, S2 and C2.
`timescale 1ns/1ps
module tb_pe_array;
  import cnn_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  phase_e phase = PH_IDLE;
  logic en = 0, first = 0, last = 0;
  pe_mode_e mode = PE_DIST;
  pix_t bram_rdata [N_BRAM];
  pix_t w1 [S1_FEAT];
  pix_t w2 [S2_FEAT];
  pix_t s1_rdata [S2_FEAT];
  pix_t c1_rdata;
  pix_t s2_rdata [S2_FEAT];
  acc_t res [N_PE];
  logic res_valid;

  pe_array dut (.clk, .rst_n, .phase, .en, .first, .last, .mode, .bram_rdata, .w1, .w2,
                .s1_rdata, .c1_rdata, .s2_rdata, .res, .res_valid);

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

  function automatic int unsigned ad(input pix_t a, input pix_t b);
    return (a > b) ? a - b : b - a;
  endfunction

  initial begin
    int unsigned exp [N_PE];
    acc_t held [N_PE];
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk); #1;
    for (int rep = 0; rep < 40; rep++) begin
      phase_e ph;
      int len;
      ph = phase_e'(PH_S1 + rep % 4);
      len = (ph == PH_S1) ? 25 : (ph == PH_S2) ? 64 : 16;
      for (int i = 0; i < N_PE; i++) begin
        exp[i] = (ph == PH_C1 || ph == PH_C2) ? 255 : 0;
        held[i] = res[i];
      end
      for (int k = 0; k < len; k++) begin
        foreach (bram_rdata[b]) bram_rdata[b] = 8'($urandom);
        foreach (w1[f]) w1[f] = 8'($urandom);
        foreach (w2[g]) w2[g] = 8'($urandom);
        foreach (s1_rdata[i]) s1_rdata[i] = 8'($urandom);
        foreach (s2_rdata[i]) s2_rdata[i] = 8'($urandom);
        c1_rdata = 8'($urandom);
        for (int i = 0; i < N_PE; i++)
          case (ph)
            PH_S1: exp[i] += ad(bram_rdata[i / 4], w1[i % 4]);
            PH_C1: if (i < 16 && s1_rdata[i] < exp[i]) exp[i] = s1_rdata[i];
            PH_S2: if (i < 16) exp[i] += ad(c1_rdata, w2[i]);
            PH_C2: if (i < 16 && s2_rdata[i] < exp[i]) exp[i] = s2_rdata[i];
            default: ;
          endcase
        phase <= ph; en <= 1; first <= (k == 0); last <= (k == len - 1);
        mode <= (ph == PH_C1 || ph == PH_C2) ? PE_MIN : PE_DIST;
        @(posedge clk); #1;
      end
      en <= 0; first <= 0; last <= 0; phase <= PH_IDLE;
      check(res_valid, "res_valid after last");
      for (int i = 0; i < N_PE; i++)
        if (ph == PH_S1 || i < 16)
          check(res[i] == acc_t'(exp[i]),
                $sformatf("phase %0d PE %0d: %0d expected %0d", ph, i, res[i], exp[i]));
        else
          check(res[i] == held[i], $sformatf("phase %0d idle PE %0d changed", ph, i));
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
