// memory_unit: every storage element of the recognizer.
//  * image_ram: the single-port 32x32 frame buffer. The host writes it while
//    the recognizer is idle; during segmentation the SU reads it.
//  * five one_port_bram buffers: written by the SU (port_en, one address per
//    BRAM) in phase PH_SEG, read by the controller at a common address in S1.
//  * weight_store: S1 and S2 weight vectors, loaded by the host.
//  * S1 maps (4 planes x 10x10) and C1 values (4 planes x 4x4) of the current
//    large field, kept in registers; the S2 maps (16 planes x 10x10, one bank
//    per feature, filled one position per large field) and the 4x4x16
//    recognition code.
// Reads are registered: every value requested on an issue clock is on the
// outputs one clock later, aligned with the weights. Writes take the PE
// results: S1 and S2 distances are shifted right (5 and 6 bits) and
// saturated to 8 bits; C1 and C2 minima are 8 bits already.
// The split into image RAM, BRAM buffers, weight memories and registers
// follows the published design; the map layout and scaling are this design's.
module memory_unit
  import cnn_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst_n,
  // host
  input  logic                   img_we,
  input  iaddr_t                 img_waddr,
  input  pix_t                   img_wdata,
  input  logic                   w_we,
  input  logic                   w_layer,
  input  logic [3:0]             w_feat,
  input  logic [5:0]             w_idx,
  input  pix_t                   w_data,
  input  logic [7:0]             code_raddr,
  output pix_t                   code_rdata,
  // segmentation unit
  input  logic                   su_img_re,
  input  iaddr_t                 su_img_addr,
  output pix_t                   su_img_rdata,
  input  logic [N_BRAM-1:0]      su_port_en,
  input  baddr_t [N_BRAM-1:0]    su_bram_addr,
  input  pix_t                   su_bram_wdata,
  // controller: read addresses (issue stage)
  input  phase_e                 phase,
  input  logic [5:0]             rd_elem,
  input  baddr_t                 bram_raddr,
  input  logic [3:0]             s1_rrow,
  input  logic [1:0]             s1_rcol,
  input  logic [6:0]             s2_raddr,
  // read data (one clock later)
  output pix_t                   bram_rdata [N_BRAM],
  output pix_t                   w1 [S1_FEAT],
  output pix_t                   w2 [S2_FEAT],
  output pix_t                   s1_rdata [S2_FEAT],
  output pix_t                   c1_rdata,
  output pix_t                   s2_rdata [S2_FEAT],
  // controller: write-back
  input  acc_t                   pe_res [N_PE],
  input  logic                   s1_we,
  input  logic [N_BRAM-1:0][6:0] s1_wwin,
  input  logic                   c1_we,
  input  logic [1:0]             c1_wrow,
  input  logic                   s2_we,
  input  logic [6:0]             s2_waddr,
  input  logic                   code_we,
  input  logic [3:0]             code_wpos
);
  localparam int unsigned MAP = N_SRF_SIDE * N_SRF_SIDE;  // 100 positions

  // ---------------- image RAM (single port shared by host and SU)
  image_ram u_img (
    .clk,
    .we   (img_we),
    .addr (img_we ? img_waddr : su_img_addr),
    .wdata(img_wdata),
    .rdata(su_img_rdata)
  );

  // ---------------- one-port BRAM buffers
  for (genvar b = 0; b < N_BRAM; b++) begin : g_bram
    logic   seg;
    assign seg = (phase == PH_SEG);
    one_port_bram u_bram (
      .clk,
      .we   (seg && su_port_en[b]),
      .addr (seg ? su_bram_addr[b] : bram_raddr),
      .wdata(su_bram_wdata),
      .rdata(bram_rdata[b])
    );
  end

  // ---------------- weights
  weight_store u_w (
    .clk, .we(w_we), .layer(w_layer), .feat(w_feat), .idx(w_idx), .wdata(w_data),
    .ridx(rd_elem), .w1, .w2
  );

  // ---------------- S1 maps and C1 values of the current large field
  pix_t s1_map [S1_FEAT][MAP];
  pix_t c1_val [S2_LEN];           // index f*16 + cy*4 + cx

  always_ff @(posedge clk) begin
    if (s1_we)
      for (int b = 0; b < N_BRAM; b++)
        for (int f = 0; f < S1_FEAT; f++)
          s1_map[f][s1_wwin[b]] <= scale_sat(pe_res[b * S1_FEAT + f], S1_SHIFT);
    if (c1_we)
      for (int i = 0; i < S1_FEAT * C1_SIDE; i++)
        c1_val[(i / C1_SIDE) * C1_SIDE * C1_SIDE + int'(c1_wrow) * C1_SIDE + (i % C1_SIDE)]
          <= pe_res[i][PIX_W-1:0];
  end

  // C1 read: PE i = 4f+cx gets S1 plane f at (s1_rrow, 2cx + s1_rcol).
  always_ff @(posedge clk) begin
    for (int i = 0; i < S1_FEAT * C1_SIDE; i++)
      s1_rdata[i] <= s1_map[i / C1_SIDE]
                     [int'(s1_rrow) * N_SRF_SIDE + (i % C1_SIDE) * C1_STRIDE + int'(s1_rcol)];
    c1_rdata <= c1_val[rd_elem];
  end

  // ---------------- S2 maps, one bank per feature
  pix_t s2_map [S2_FEAT][MAP];

  always_ff @(posedge clk) begin
    if (s2_we)
      for (int g = 0; g < S2_FEAT; g++)
        s2_map[g][s2_waddr] <= scale_sat(pe_res[g], S2_SHIFT);
    for (int g = 0; g < S2_FEAT; g++)
      s2_rdata[g] <= s2_map[g][s2_raddr];
  end

  // ---------------- recognition code, index g*16 + qy*4 + qx
  pix_t code [CODE_LEN];

  always_ff @(posedge clk) begin
    if (code_we)
      for (int g = 0; g < S2_FEAT; g++)
        code[g * C2_SIDE * C2_SIDE + int'(code_wpos)] <= pe_res[g][PIX_W-1:0];
    code_rdata <= code[code_raddr];
  end

  // The image port serves either the host or the SU, never both.
  a_img_port: assert property (@(posedge clk) disable iff (!rst_n) !(img_we && su_img_re));
endmodule
