// pe_array: the 20 processing elements, organised as five groups of four. In
// S1 each group shares one BRAM output (the same small field vector) and each
// PE of the group compares it with one of the four S1 weight vectors. The
// later layers use only PEs 0..15, with fewer shared operands:
//   S1: PE 4b+f : a = BRAM b,      w = S1 weight f       (distance)
//   C1: PE i    : a = S1 read i                          (minimum)
//   S2: PE g    : a = C1 value (broadcast), w = S2 weight g (distance)
//   C2: PE g    : a = S2 map g                           (minimum)
// `phase`, `en`, `first`, `last` and `mode` come from the controller's
// operand stage and are common to all PEs; PEs that a layer does not use are
// not enabled. Results (`res`) follow one clock later with `res_valid`.
module pe_array
  import cnn_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  phase_e   phase,
  input  logic     en,
  input  logic     first,
  input  logic     last,
  input  pe_mode_e mode,
  input  pix_t     bram_rdata [N_BRAM],
  input  pix_t     w1 [S1_FEAT],
  input  pix_t     w2 [S2_FEAT],
  input  pix_t     s1_rdata [S2_FEAT],
  input  pix_t     c1_rdata,
  input  pix_t     s2_rdata [S2_FEAT],
  output acc_t     res [N_PE],
  output logic     res_valid
);
  logic [N_PE-1:0] rv;

  for (genvar i = 0; i < N_PE; i++) begin : g_pe
    pix_t a, w;
    logic e;
    always_comb begin
      a = '0;
      w = '0;
      e = en;
      unique case (phase)
        PH_S1: begin a = bram_rdata[i / S1_FEAT]; w = w1[i % S1_FEAT]; end
        PH_C1: if (i < S2_FEAT) a = s1_rdata[i % S2_FEAT]; else e = 1'b0;
        PH_S2: if (i < S2_FEAT) begin a = c1_rdata; w = w2[i % S2_FEAT]; end else e = 1'b0;
        PH_C2: if (i < S2_FEAT) a = s2_rdata[i % S2_FEAT]; else e = 1'b0;
        default: e = 1'b0;
      endcase
    end
    pe u_pe (
      .clk, .rst_n, .en(e), .first, .last, .mode, .a, .w,
      .acc(res[i]), .res_valid(rv[i])
    );
  end

  // All PEs that a layer uses finish together; PE 0 is used by every layer.
  assign res_valid = rv[0];
  // PEs 16..19 only take part in S1, where they finish with PE 0.
  a_rv_s1: assert property (@(posedge clk) disable iff (!rst_n) rv[N_PE-1] |-> rv[0]);
endmodule
