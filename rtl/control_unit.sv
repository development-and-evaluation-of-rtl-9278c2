// control_unit: the SIMD sequencer of the recognizer. For every large
// receptive field (10 x 10 of them, row order) it
//   1. starts the segmentation unit and waits for its `su_done`, which leaves
//      the 100 small field vectors in the five one-port BRAMs;
//   2. S1: streams the 20 BRAM partitions (25 pixels each) to the PEs; all five
//      BRAMs are read at the same address, so the 20 PEs compute 5 vectors x 4
//      features per pass (20 passes, 500 clocks);
//   3. C1: 4 passes of 16 clocks; PE 4f+cx takes the minimum of the 4x4 S1
//      window at row 2r, column 2cx of plane f;
//   4. S2: one pass of 64 clocks; the 4x4x4 C1 values are broadcast to 16 PEs,
//      one per S2 feature; the results are written to the S2 maps at the large
//      field's position and `one_simp2_end_flag` pulses.
// After the last large field, C2 runs 16 passes of 16 clocks (PE g = feature g,
// pass q = output position) and writes the 4x4x16 recognition code; `done`
// pulses and `busy` falls. Two idle clocks separate the layers so the last
// results are written before the next layer reads them.
// Pipeline: on an issue clock the controller presents read addresses (rd_*);
// every memory answers one clock later, when the PEs get pe_en/first/last; the
// PEs' results appear one clock after that, with the wr_* strobes. The
// window-to-BRAM mapping of S1 depends on SEG_METHOD (see cnn_pkg::win_of).
// The layer order, the parallelism per layer and the reuse of one PE array by
// all layers follow the published design; pass order, idle clocks and the
// exact signal timing are this design's.
module control_unit
  import cnn_pkg::*;
#(
  parameter int unsigned SEG_METHOD = 2
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  output logic                  busy,
  output logic                  done,
  output logic                  one_simp2_end_flag,
  // segmentation unit
  output logic                  su_start,
  output logic [3:0]            lrf_y,
  output logic [3:0]            lrf_x,
  input  logic                  su_done,
  // issue stage: phase and read addresses
  output phase_e                phase,
  output logic [5:0]            rd_elem,
  output baddr_t                bram_raddr,
  output logic [3:0]            s1_rrow,
  output logic [1:0]            s1_rcol,
  output logic [6:0]            s2_raddr,
  // PE stage
  output phase_e                pe_phase,
  output logic                  pe_en,
  output logic                  pe_first,
  output logic                  pe_last,
  output pe_mode_e              pe_mode,
  // write-back stage
  output logic                  s1_we,
  output logic [N_BRAM-1:0][6:0] s1_wwin,
  output logic                  c1_we,
  output logic [1:0]            c1_wrow,
  output logic                  s2_we,
  output logic [6:0]            s2_waddr,
  output logic                  code_we,
  output logic [3:0]            code_wpos
);
  typedef enum logic [2:0] {ST_IDLE, ST_SEG_START, ST_SEG_WAIT, ST_STREAM, ST_DRAIN} state_e;

  state_e     state;
  logic [4:0] grp;
  logic [5:0] e;
  logic [1:0] drain;
  logic [4:0] glim;
  logic [5:0] elim;
  logic       issue, ilast;

  always_comb begin
    unique case (phase)
      PH_S1:   begin glim = 5'(VEC_PER_BRAM - 1); elim = 6'(SRF_LEN - 1); end
      PH_C1:   begin glim = 5'(C1_SIDE - 1);      elim = 6'(C1_WIN * C1_WIN - 1); end
      PH_S2:   begin glim = 5'd0;                 elim = 6'(S2_LEN - 1); end
      PH_C2:   begin glim = 5'(C2_SIDE * C2_SIDE - 1); elim = 6'(C2_WIN * C2_WIN - 1); end
      default: begin glim = 5'd0;                 elim = 6'd0; end
    endcase
  end

  assign issue = (state == ST_STREAM);
  assign ilast = (e == elim);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= ST_IDLE; phase <= PH_IDLE; grp <= '0; e <= '0; drain <= '0;
      lrf_y <= '0; lrf_x <= '0;
    end else begin
      unique case (state)
        ST_IDLE: if (start) begin
          lrf_y <= '0; lrf_x <= '0; state <= ST_SEG_START; phase <= PH_SEG;
        end
        ST_SEG_START: state <= ST_SEG_WAIT;
        ST_SEG_WAIT: if (su_done) begin
          state <= ST_STREAM; phase <= PH_S1; grp <= '0; e <= '0;
        end
        ST_STREAM: begin
          if (ilast) begin
            e <= '0;
            if (grp == glim) begin
              grp <= '0; state <= ST_DRAIN; drain <= 2'd1;
            end else grp <= grp + 5'd1;
          end else e <= e + 6'd1;
        end
        ST_DRAIN: begin
          if (drain != 0) drain <= drain - 2'd1;
          else begin
            state <= ST_STREAM;
            unique case (phase)
              PH_S1: phase <= PH_C1;
              PH_C1: phase <= PH_S2;
              PH_S2: begin
                if (lrf_y == 4'(N_LRF_SIDE - 1) && lrf_x == 4'(N_LRF_SIDE - 1)) begin
                  phase <= PH_C2;
                end else begin
                  state <= ST_SEG_START; phase <= PH_SEG;
                  if (lrf_x == 4'(N_LRF_SIDE - 1)) begin
                    lrf_x <= '0; lrf_y <= lrf_y + 4'd1;
                  end else lrf_x <= lrf_x + 4'd1;
                end
              end
              default: begin state <= ST_IDLE; phase <= PH_IDLE; end  // after C2
            endcase
          end
        end
        default: state <= ST_IDLE;
      endcase
    end
  end

  assign su_start = (state == ST_SEG_START);
  assign busy     = (state != ST_IDLE);

  // Issue-stage read addresses.
  always_comb begin
    rd_elem    = e;
    bram_raddr = baddr_t'(10'(grp) * 10'(PART_BYTES) + 10'(e));
    s1_rrow    = 4'(grp) * 4'(C1_STRIDE) + 4'(e[3:2]);
    s1_rcol    = e[1:0];
    s2_raddr   = 7'((7'(grp[3:2]) * 7'(C2_STRIDE) + 7'(e[3:2])) * 7'(N_LRF_SIDE)
                    + 7'(grp[1:0]) * 7'(C2_STRIDE) + 7'(e[1:0]));
  end

  // Stage 1 (operands at the PEs) and stage 2 (results ready).
  logic       v1, f1, l1, wr2;
  logic [4:0] grp1, grp2;
  phase_e     ph2;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v1 <= 1'b0; f1 <= 1'b0; l1 <= 1'b0; grp1 <= '0; pe_phase <= PH_IDLE;
      wr2 <= 1'b0; grp2 <= '0; ph2 <= PH_IDLE; done <= 1'b0;
    end else begin
      v1       <= issue;
      f1       <= issue && (e == 6'd0);
      l1       <= issue && ilast;
      grp1     <= grp;
      pe_phase <= issue ? phase : PH_IDLE;
      wr2      <= v1 && l1;
      grp2     <= grp1;
      ph2      <= pe_phase;
      done     <= v1 && l1 && (pe_phase == PH_C2) && (grp1 == 5'(C2_SIDE * C2_SIDE - 1));
    end
  end

  assign pe_en    = v1;
  assign pe_first = f1;
  assign pe_last  = l1;
  assign pe_mode  = (pe_phase == PH_C1 || pe_phase == PH_C2) ? PE_MIN : PE_DIST;

  always_comb begin
    s1_we     = wr2 && (ph2 == PH_S1);
    c1_we     = wr2 && (ph2 == PH_C1);
    s2_we     = wr2 && (ph2 == PH_S2);
    code_we   = wr2 && (ph2 == PH_C2);
    c1_wrow   = grp2[1:0];
    code_wpos = grp2[3:0];
    s2_waddr  = 7'(lrf_y) * 7'(N_LRF_SIDE) + 7'(lrf_x);
    for (int b = 0; b < N_BRAM; b++)
      s1_wwin[b] = win_of(SEG_METHOD, b, 32'(grp2));
  end
  assign one_simp2_end_flag = s2_we;
endmodule
