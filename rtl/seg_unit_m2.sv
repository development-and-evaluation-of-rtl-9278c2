// seg_unit_m2: second segmentation method. It fills the five one-port BRAMs
// with the 100 small receptive field vectors of one large field while reading
// each image pixel that a group of windows shares only once. Horizontally
// neighbouring small fields go to different BRAMs: BRAM b holds the fields in
// columns b and b+5 of every row, in partition 2*row+half. For one row of
// small fields and one half (five windows, columns 5*half+b), the nine image
// columns t = 0..8 they cover are read top to bottom, five pixels per column:
// 45 reads, counted by the internal counter (j = row in window, t = column).
// A pixel of column t lies in the windows b with b <= t <= b+4; those are the
// set bits of a 5-bit twisted ring counter that starts at 00001 and steps
// once per column, so one read is written to up to five BRAMs on the same
// clock (all five for t = 4). Each enabled BRAM b gets its own address
// (2*row+half)*32 + 5*j + (t-b), formed in a pipeline register next to the
// read. Per large field: 9 x 5 x 2 x 10 = 900 image RAM reads.
// Timing: `start` is sampled on a clock edge; 900 reads follow on consecutive
// clocks; each pixel is written on the clock after its read (port_en).
// `done` is high on the clock of the last write, `busy` from the clock after
// `start` through `done`. The window-to-BRAM assignment, read order and the
// counters follow the published method; the handshake is this design's.
module seg_unit_m2
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
  localparam int unsigned N_COL = 2 * SRF - 1;  // 9 columns per group of 5 windows

  logic        run;
  logic [2:0]  j;      // pixel row inside the windows (0..4)
  logic [3:0]  t;      // image column inside the group (0..8)
  logic        half;   // windows 0..4 or 5..9 of the row
  logic [3:0]  sy;     // row of small fields (0..9)
  logic [N_BRAM-1:0] ring;

  logic        col_end, grp_end, last;
  logic        jc_init, jc_en;

  assign col_end = (j == 3'(SRF - 1));
  assign grp_end = col_end && (t == 4'(N_COL - 1));
  assign last    = grp_end && half && (sy == 4'(N_SRF_SIDE - 1));

  // Twisted ring counter: loaded with 00001 at each group start, stepped
  // at the end of every column inside the group.
  assign jc_init = (start && !run) || (run && grp_end);
  assign jc_en   = run && col_end;

  johnson_counter #(.W(N_BRAM)) u_ring (
    .clk, .rst_n, .clr(1'b0), .init(jc_init), .en(jc_en), .q(ring)
  );

  assign img_re   = run;
  assign img_addr = iaddr_t'((10'(lrf_y) * 10'(LRF_STRIDE) + 10'(sy) + 10'(j)) * 10'(IMG_SIDE)
                             + 10'(lrf_x) * 10'(LRF_STRIDE) + (half ? 10'(N_BRAM) : 10'd0)
                             + 10'(t));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      run <= 1'b0; j <= '0; t <= '0; half <= 1'b0; sy <= '0;
    end else if (start && !run) begin
      run <= 1'b1; j <= '0; t <= '0; half <= 1'b0; sy <= '0;
    end else if (run) begin
      if (last) run <= 1'b0;
      if (col_end) begin
        j <= '0;
        if (grp_end) begin
          t    <= '0;
          half <= ~half;
          if (half) sy <= sy + 4'd1;
        end else t <= t + 4'd1;
      end else j <= j + 3'd1;
    end
  end

  // Pipelined addressing: one address per BRAM, registered with the read.
  logic              wr_q, last_q;
  logic [N_BRAM-1:0] en_q;
  baddr_t [N_BRAM-1:0] addr_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wr_q <= 1'b0; last_q <= 1'b0; en_q <= '0; addr_q <= '0;
    end else begin
      wr_q   <= run;
      last_q <= run && last;
      en_q   <= run ? ring : '0;
      for (int b = 0; b < N_BRAM; b++)
        addr_q[b] <= baddr_t'((10'(sy) * 10'd2 + 10'(half)) * 10'(PART_BYTES)
                              + 10'(j) * 10'(SRF) + 10'(t) - 10'(b));
    end
  end

  assign port_en    = en_q;
  assign bram_addr  = addr_q;
  assign bram_wdata = img_rdata;
  assign done       = last_q;
  assign busy       = run || wr_q;

  // The enabled BRAMs always form one contiguous run (a twisted ring state).
  a_ring: assert property (@(posedge clk) disable iff (!rst_n)
                           run |-> (ring != '0));
endmodule
