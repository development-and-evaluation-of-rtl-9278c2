// cnn_face_recognizer: top level of a hardware convolutional neural network
// (Neocognitron-style) face recognizer built as a SIMD array: one control
// unit, one memory unit, one segmentation unit and 20 processing elements.
// The 32x32 image is processed as 10x10 overlapping 14x14 large receptive
// fields, one after the other; each large field is copied by the
// segmentation unit from the single-port image RAM into five one-port BRAM
// buffers (100 small 5x5 field vectors) and then reduced in parallel by the
// PEs through S1 (4 features), C1 (4x4 minimum) and S2 (16 features) to one
// last-layer simple cell per feature. After all 100 large fields, C2 forms
// the 4x4x16 = 256-byte recognition code.
// SEG_METHOD selects the segmentation unit: 2 (default) is the parallel
// method with the twisted ring counter, 900 image reads per large field;
// 1 is the interleaved method, 2500 reads per large field.
// Interface: load the image (img_*) and the weights (w_*) while idle, pulse
// `start`, wait for `done` (a one-clock pulse; `busy` falls on the next
// clock), then read the code through code_raddr/code_rdata (one clock
// latency; address = feature*16 + qy*4 + qx). `one_simp2_end_flag` pulses
// when a large field's S2 cells are finished. Synchronous active-low reset.
module cnn_face_recognizer
  import cnn_pkg::*;
#(
  parameter int unsigned SEG_METHOD = 2
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       img_we,
  input  iaddr_t     img_waddr,
  input  pix_t       img_wdata,
  input  logic       w_we,
  input  logic       w_layer,
  input  logic [3:0] w_feat,
  input  logic [5:0] w_idx,
  input  pix_t       w_data,
  input  logic       start,
  output logic       busy,
  output logic       done,
  output logic       one_simp2_end_flag,
  input  logic [7:0] code_raddr,
  output pix_t       code_rdata
);
  // segmentation unit <-> memory unit / control unit
  logic                su_start, su_busy, su_done, su_img_re;
  logic [3:0]          lrf_y, lrf_x;
  iaddr_t              su_img_addr;
  pix_t                su_img_rdata, su_bram_wdata;
  logic [N_BRAM-1:0]   su_port_en;
  baddr_t [N_BRAM-1:0] su_bram_addr;

  // control unit -> memory unit / PEs
  phase_e              phase, pe_phase;
  logic [5:0]          rd_elem;
  baddr_t              bram_raddr;
  logic [3:0]          s1_rrow;
  logic [1:0]          s1_rcol;
  logic [6:0]          s2_raddr;
  logic                pe_en, pe_first, pe_last;
  pe_mode_e            pe_mode;
  logic                s1_we, c1_we, s2_we, code_we;
  logic [N_BRAM-1:0][6:0] s1_wwin;
  logic [1:0]          c1_wrow;
  logic [6:0]          s2_waddr;
  logic [3:0]          code_wpos;

  // memory unit -> PEs -> memory unit
  pix_t                bram_rdata [N_BRAM];
  pix_t                w1 [S1_FEAT];
  pix_t                w2 [S2_FEAT];
  pix_t                s1_rdata [S2_FEAT];
  pix_t                c1_rdata;
  pix_t                s2_rdata [S2_FEAT];
  acc_t                pe_res [N_PE];
  logic                pe_res_valid;

  control_unit #(.SEG_METHOD(SEG_METHOD)) u_cu (
    .clk, .rst_n, .start, .busy, .done, .one_simp2_end_flag,
    .su_start, .lrf_y, .lrf_x, .su_done,
    .phase, .rd_elem, .bram_raddr, .s1_rrow, .s1_rcol, .s2_raddr,
    .pe_phase, .pe_en, .pe_first, .pe_last, .pe_mode,
    .s1_we, .s1_wwin, .c1_we, .c1_wrow, .s2_we, .s2_waddr, .code_we, .code_wpos
  );

  if (SEG_METHOD == 1) begin : g_su1
    seg_unit_m1 u_su (
      .clk, .rst_n, .start(su_start), .lrf_y, .lrf_x, .busy(su_busy), .done(su_done),
      .img_re(su_img_re), .img_addr(su_img_addr), .img_rdata(su_img_rdata),
      .port_en(su_port_en), .bram_addr(su_bram_addr), .bram_wdata(su_bram_wdata)
    );
  end else begin : g_su2
    seg_unit_m2 u_su (
      .clk, .rst_n, .start(su_start), .lrf_y, .lrf_x, .busy(su_busy), .done(su_done),
      .img_re(su_img_re), .img_addr(su_img_addr), .img_rdata(su_img_rdata),
      .port_en(su_port_en), .bram_addr(su_bram_addr), .bram_wdata(su_bram_wdata)
    );
  end

  memory_unit u_mu (
    .clk, .rst_n,
    .img_we, .img_waddr, .img_wdata, .w_we, .w_layer, .w_feat, .w_idx, .w_data,
    .code_raddr, .code_rdata,
    .su_img_re, .su_img_addr, .su_img_rdata, .su_port_en, .su_bram_addr, .su_bram_wdata,
    .phase, .rd_elem, .bram_raddr, .s1_rrow, .s1_rcol, .s2_raddr,
    .bram_rdata, .w1, .w2, .s1_rdata, .c1_rdata, .s2_rdata,
    .pe_res, .s1_we, .s1_wwin, .c1_we, .c1_wrow, .s2_we, .s2_waddr, .code_we, .code_wpos
  );

  pe_array u_pes (
    .clk, .rst_n, .phase(pe_phase), .en(pe_en), .first(pe_first), .last(pe_last),
    .mode(pe_mode), .bram_rdata, .w1, .w2, .s1_rdata, .c1_rdata, .s2_rdata,
    .res(pe_res), .res_valid(pe_res_valid)
  );

  // The SU is only started while it is idle.
  a_su_start: assert property (@(posedge clk) disable iff (!rst_n) su_start |-> !su_busy);
  // Every write-back of PE results happens while the PEs flag a finished result.
  a_res_valid: assert property (@(posedge clk) disable iff (!rst_n)
                                (s1_we || c1_we || s2_we || code_we) |-> pe_res_valid);
endmodule
