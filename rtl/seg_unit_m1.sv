// seg_unit_m1: first (interleaved) segmentation method. For one 14x14 large
// receptive field it copies the 100 overlapping 5x5 small receptive fields
// from the single-port image RAM into the five one-port BRAMs, reading every
// pixel of every small field separately: 25 x 100 = 2500 image RAM reads.
// Three counters step the copy: c0 = pixel in the vector (0..24), c1 = vector
// within a BRAM (0..19), c2 = BRAM (0..4), advancing c1 when c0 wraps and c2
// when c1 wraps. All BRAM ports share the address c1*32+c0; the port enable
// is c2 decoded to one-hot, so each pixel goes to exactly one BRAM. BRAM c2
// thus holds vectors 20*c2 .. 20*c2+19 (small fields in row order). The image
// address is formed from the large field origin (2*lrf_y, 2*lrf_x), the small
// field position (v/10, v%10) with v = 20*c2+c1, and the pixel (c0/5, c0%5).
// Timing: `start` is sampled on a clock edge; a read is issued on each of the
// following 2500 clocks; the image RAM answers one clock later and the pixel
// is written on that clock (port_en non-zero). `done` is high on the clock of
// the last write; `busy` from the clock after `start` through `done`.
// The counter structure and the decoder follow the published method; the
// start/done handshake and the one-clock read pipeline are this design's.
module seg_unit_m1
  import cnn_pkg::*;
(
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      start,
  input  logic [3:0]                lrf_y,
  input  logic [3:0]                lrf_x,
  output logic                      busy,
  output logic                      done,
  output logic                      img_re,
  output iaddr_t                    img_addr,
  input  pix_t                      img_rdata,
  output logic [N_BRAM-1:0]         port_en,
  output baddr_t [N_BRAM-1:0]       bram_addr,
  output pix_t                      bram_wdata
);
  logic        run;
  logic [4:0]  c0;   // pixel in vector
  logic [4:0]  c1;   // vector in BRAM
  logic [2:0]  c2;   // BRAM select
  logic        wr_q, last_q;
  logic [2:0]  c2_q;
  baddr_t      waddr_q;

  logic        last;
  logic [6:0]  v;
  logic [3:0]  sy, sx;
  logic [2:0]  py, px;

  assign last = (c0 == 5'(SRF_LEN - 1)) && (c1 == 5'(VEC_PER_BRAM - 1)) && (c2 == 3'(N_BRAM - 1));

  always_comb begin
    v  = 7'(c2) * 7'(VEC_PER_BRAM) + 7'(c1);
    sy = 4'(v / 7'(N_SRF_SIDE));
    sx = 4'(v % 7'(N_SRF_SIDE));
    py = 3'(c0 / 5'(SRF));
    px = 3'(c0 % 5'(SRF));
    img_addr = iaddr_t'((10'(lrf_y) * 10'(LRF_STRIDE) + 10'(sy) + 10'(py)) * 10'(IMG_SIDE)
                        + 10'(lrf_x) * 10'(LRF_STRIDE) + 10'(sx) + 10'(px));
  end
  assign img_re = run;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      run <= 1'b0; c0 <= '0; c1 <= '0; c2 <= '0;
      wr_q <= 1'b0; last_q <= 1'b0; c2_q <= '0; waddr_q <= '0;
    end else begin
      wr_q    <= run;
      last_q  <= run && last;
      c2_q    <= c2;
      waddr_q <= baddr_t'(10'(c1) * 10'(PART_BYTES) + 10'(c0));
      if (start && !run) begin
        run <= 1'b1; c0 <= '0; c1 <= '0; c2 <= '0;
      end else if (run) begin
        if (last) run <= 1'b0;
        if (c0 == 5'(SRF_LEN - 1)) begin
          c0 <= '0;
          if (c1 == 5'(VEC_PER_BRAM - 1)) begin
            c1 <= '0;
            c2 <= (c2 == 3'(N_BRAM - 1)) ? '0 : c2 + 3'd1;
          end else c1 <= c1 + 5'd1;
        end else c0 <= c0 + 5'd1;
      end
    end
  end

  // Write stage: decoder on c2 gives the port enables; address is common.
  always_comb begin
    for (int b = 0; b < N_BRAM; b++) begin
      port_en[b]   = wr_q && (c2_q == 3'(b));
      bram_addr[b] = waddr_q;
    end
  end
  assign bram_wdata = img_rdata;
  assign done       = last_q;
  assign busy       = run || wr_q;

  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(port_en));
endmodule
