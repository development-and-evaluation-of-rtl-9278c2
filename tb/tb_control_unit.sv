// tb_control_unit: runs the sequencer through one whole image with a stub
// segmentation unit that answers `su_start` with `su_done` after a random
// delay. It checks the large-field order, the number of operand clocks and
// vectors per layer (S1 20x25, C1 4x16, S2 1x64 per field, C2 16x16 per
// image), every issue-stage read address against its own counters, the PE
// mode per layer, the write-back strobes and their addresses (including the
// method-2 window-to-BRAM mapping of S1), the S2 completion flag, the clocks
// from su_done to the field's S2 write, and the final done pulse.
`timescale 1ns/1ps
module tb_control_unit;
  import cnn_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0, busy, done, s2flag, su_start, su_done = 0;
  logic [3:0] lrf_y, lrf_x;
  phase_e phase, pe_phase;
  logic [5:0] rd_elem;
  baddr_t bram_raddr;
  logic [3:0] s1_rrow;
  logic [1:0] s1_rcol;
  logic [6:0] s2_raddr, s2_waddr;
  logic pe_en, pe_first, pe_last, s1_we, c1_we, s2_we, code_we;
  pe_mode_e pe_mode;
  logic [N_BRAM-1:0][6:0] s1_wwin;
  logic [1:0] c1_wrow;
  logic [3:0] code_wpos;

  control_unit dut (.clk, .rst_n, .start, .busy, .done, .one_simp2_end_flag(s2flag),
    .su_start, .lrf_y, .lrf_x, .su_done, .phase, .rd_elem, .bram_raddr, .s1_rrow, .s1_rcol,
    .s2_raddr, .pe_phase, .pe_en, .pe_first, .pe_last, .pe_mode, .s1_we, .s1_wwin, .c1_we,
    .c1_wrow, .s2_we, .s2_waddr, .code_we, .code_wpos);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // stub segmentation unit
  int fields = 0;
  initial begin
    forever begin
      @(posedge clk);
      if (su_start) begin
        check(lrf_y == 4'(fields / 10) && lrf_x == 4'(fields % 10),
              $sformatf("field %0d at (%0d,%0d)", fields, lrf_y, lrf_x));
        check(phase == PH_SEG, "phase SEG while segmenting");
        fields++;
        repeat ($urandom % 8) @(posedge clk);
        su_done <= 1;
        @(posedge clk);
        su_done <= 0;
      end
    end
  end

  // issue-stage bookkeeping: the values of the previous clock are checked
  // when pe_en shows that clock was an issue clock
  int n_op [6], n_first [6];
  int idx [6];
  phase_e ph_q; baddr_t ba_q; logic [5:0] re_q; logic [3:0] rr_q; logic [1:0] rc_q; logic [6:0] sa_q;
  int s1w = 0, c1w = 0, s2w = 0, cw = 0, dones = 0, flags = 0;
  int t_sudone = 0, cyc = 0;

  always @(posedge clk) begin
    cyc++;
    if (su_done) t_sudone = cyc;
    if (pe_en) begin
      int el, g, e;
      el = (pe_phase == PH_S1) ? 25 : (pe_phase == PH_S2) ? 64 : 16;
      g = idx[pe_phase] / el;
      e = idx[pe_phase] % el;
      n_op[pe_phase]++;
      if (pe_first) n_first[pe_phase]++;
      check(ph_q == pe_phase, "PE phase follows issue phase");
      check(pe_first == (e == 0) && pe_last == (e == el - 1), "first/last");
      check(pe_mode == ((pe_phase == PH_C1 || pe_phase == PH_C2) ? PE_MIN : PE_DIST), "PE mode");
      check(re_q == 6'(e), "element index");
      case (pe_phase)
        PH_S1: check(ba_q == baddr_t'(g * 32 + e), $sformatf("bram address %0d, expected %0d", ba_q, g*32+e));
        PH_C1: check(rr_q == 4'(2 * g + e / 4) && rc_q == 2'(e % 4), "S1 read row/column");
        PH_C2: check(sa_q == 7'((2 * (g / 4) + e / 4) * 10 + 2 * (g % 4) + e % 4), "S2 read address");
        default: ;
      endcase
      idx[pe_phase] = (idx[pe_phase] + 1) % ((pe_phase == PH_S1) ? 500 : (pe_phase == PH_C2) ? 256 : 64);
    end
    ph_q <= phase; ba_q <= bram_raddr; re_q <= rd_elem; rr_q <= s1_rrow; rc_q <= s1_rcol; sa_q <= s2_raddr;
    if (s1_we) begin
      for (int b = 0; b < 5; b++)
        check(s1_wwin[b] == 7'((s1w % 20) / 2 * 10 + 5 * ((s1w % 20) % 2) + b),
              $sformatf("S1 write %0d BRAM %0d window %0d", s1w, b, s1_wwin[b]));
      s1w++;
    end
    if (c1_we) begin check(c1_wrow == 2'(c1w % 4), "C1 row"); c1w++; end
    if (s2_we) begin
      check(s2_waddr == 7'(s2w), "S2 write position");
      check(cyc - t_sudone == 634, $sformatf("su_done to S2 write: %0d clocks", cyc - t_sudone));
      s2w++;
    end
    if (s2flag) flags++;
    if (code_we) begin check(code_wpos == 4'(cw), "code position"); cw++; end
    if (done) dones++;
  end

  initial begin
    for (int i = 0; i < 6; i++) begin n_op[i] = 0; n_first[i] = 0; idx[i] = 0; end
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    check(!busy, "idle after reset");
    start <= 1;
    @(posedge clk);
    start <= 0;
    while (!done) @(posedge clk);
    @(posedge clk); #1;
    check(!busy, "idle after done");
    repeat (5) @(posedge clk);
    check(fields == 100, $sformatf("%0d large fields", fields));
    check(n_op[PH_S1] == 50000 && n_first[PH_S1] == 2000, "S1 operand clocks");
    check(n_op[PH_C1] == 6400 && n_first[PH_C1] == 400, "C1 operand clocks");
    check(n_op[PH_S2] == 6400 && n_first[PH_S2] == 100, "S2 operand clocks");
    check(n_op[PH_C2] == 256 && n_first[PH_C2] == 16, "C2 operand clocks");
    check(s1w == 2000 && c1w == 400 && s2w == 100 && cw == 16, "write-back counts");
    check(flags == 100, "one_simp2_end_flag once per field");
    check(dones == 1, "one done pulse");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
