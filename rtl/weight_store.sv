// weight_store: the shared weight vectors of the simple-cell layers. S1 has
// 4 features of 25 weights (one per pixel of a 5x5 small receptive field);
// S2 has 16 features of 64 weights (one per C1 value of a large field,
// ordered plane, row, column). One read index `ridx` fetches element ridx of
// every feature at once, registered (one clock latency): w1[f] for the four
// S1 features and w2[g] for the sixteen S2 features. The weights are trained
// off-line, so the store is loaded through a byte-wide write port (we,
// layer 0 = S1 / 1 = S2, feature, index, data) before recognition starts;
// in an FPGA it maps to block RAM initialised with the trained values.
// Contents are not reset.
module weight_store
  import cnn_pkg::*;
(
  input  logic       clk,
  input  logic       we,
  input  logic       layer,
  input  logic [3:0] feat,
  input  logic [5:0] idx,
  input  pix_t       wdata,
  input  logic [5:0] ridx,
  output pix_t       w1 [S1_FEAT],
  output pix_t       w2 [S2_FEAT]
);
  pix_t s1w [S1_FEAT][SRF_LEN];
  pix_t s2w [S2_FEAT][S2_LEN];

  always_ff @(posedge clk) begin
    if (we && !layer && feat < 4'(S1_FEAT) && idx < 6'(SRF_LEN))
      s1w[feat[1:0]][idx[4:0]] <= wdata;
    if (we && layer)
      s2w[feat][idx] <= wdata;
  end

  always_ff @(posedge clk) begin
    for (int f = 0; f < S1_FEAT; f++)
      w1[f] <= (ridx < 6'(SRF_LEN)) ? s1w[f][ridx[4:0]] : '0;
    for (int g = 0; g < S2_FEAT; g++)
      w2[g] <= s2w[g][ridx];
  end
endmodule
