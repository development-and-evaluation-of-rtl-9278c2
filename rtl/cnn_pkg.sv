// cnn_pkg: sizes, types and small helper functions shared by the CNN face
// recognizer. The network sizes are those of the face recognizer: a 32x32
// 8-bit image, 5x5 small receptive fields that overlap by four pixels, 14x14
// large receptive fields (one per last-layer simple cell) at a stride of two,
// five one-port BRAM buffers of 32 partitions x 32 bytes, 20 processing
// elements in five groups of four, layer C1 = 4x4 windows with two pixels of
// overlap on 4 planes, S2 = 4x4x4 fields with 16 features, C2 = 4x4 windows with
// two pixels of overlap on 16 planes. Accumulator width, output scaling and
// the layer-phase encoding are this design's own choices.
package cnn_pkg;

  localparam int PIX_W        = 8;   // pixel and activation width
  localparam int IMG_SIDE     = 32;  // image is IMG_SIDE x IMG_SIDE, row order
  localparam int IMG_AW       = 10;  // image RAM address width
  localparam int SRF          = 5;   // small receptive field side
  localparam int SRF_LEN      = 25;  // pixels per small receptive field vector
  localparam int N_SRF_SIDE   = 10;  // small fields per side of a large field
  localparam int LRF_SIDE     = 14;  // large receptive field side
  localparam int LRF_STRIDE   = 2;   // step between large fields
  localparam int N_LRF_SIDE   = 10;  // large fields per image side
  localparam int N_BRAM       = 5;   // one-port BRAM buffers
  localparam int PART_BYTES   = 32;  // bytes per BRAM partition
  localparam int N_PART       = 32;  // partitions per one-port BRAM
  localparam int BRAM_AW      = 10;  // one-port BRAM address width (1 KiB)
  localparam int VEC_PER_BRAM = 20;  // small field vectors held per BRAM
  localparam int S1_FEAT      = 4;   // S1 features (PEs per BRAM)
  localparam int N_PE         = N_BRAM * S1_FEAT;  // 20 processing elements
  localparam int C1_WIN       = 4;   // C1 window side
  localparam int C1_STRIDE    = 2;
  localparam int C1_SIDE      = 4;   // C1 plane side inside one large field
  localparam int S2_FEAT      = 16;  // S2 features
  localparam int S2_LEN       = S1_FEAT * C1_SIDE * C1_SIDE;  // 64 inputs per S2 cell
  localparam int C2_WIN       = 4;
  localparam int C2_STRIDE    = 2;
  localparam int C2_SIDE      = 4;   // recognition code is C2_SIDE x C2_SIDE x S2_FEAT
  localparam int CODE_LEN     = S2_FEAT * C2_SIDE * C2_SIDE;  // 256
  localparam int ACC_W        = 16;  // PE accumulator width (64 x 255 fits)
  localparam int S1_SHIFT     = 5;   // S1 distance (<= 6375) scaled into 8 bits
  localparam int S2_SHIFT     = 6;   // S2 distance (<= 16320) scaled into 8 bits

  typedef logic [PIX_W-1:0]   pix_t;
  typedef logic [BRAM_AW-1:0] baddr_t;
  typedef logic [IMG_AW-1:0]  iaddr_t;
  typedef logic [ACC_W-1:0]   acc_t;

  // Layer currently streamed through the PEs (PH_SEG: BRAMs belong to the SU).
  typedef enum logic [2:0] {
    PH_IDLE = 3'd0,
    PH_SEG  = 3'd1,
    PH_S1   = 3'd2,
    PH_C1   = 3'd3,
    PH_S2   = 3'd4,
    PH_C2   = 3'd5
  } phase_e;

  // PE operation: Manhattan distance (simple cells) or window minimum (complex cells).
  typedef enum logic {PE_DIST = 1'b0, PE_MIN = 1'b1} pe_mode_e;

  // Right shift with saturation to an 8-bit activation.
  function automatic pix_t scale_sat(input acc_t acc, input int unsigned sh);
    acc_t s;
    s = acc >> sh;
    return (s > acc_t'(255)) ? pix_t'(255) : s[PIX_W-1:0];
  endfunction

  // Position (sy*10+sx) inside the large field of the small field vector held
  // in partition `slot` of BRAM `b`, for segmentation method 1 or 2.
  //   method 1: BRAM b holds vectors 20*b .. 20*b+19 in row order.
  //   method 2: BRAM b holds the fields of columns b and b+5; slot = 2*row + half.
  function automatic logic [6:0] win_of(input int unsigned method,
                                        input int unsigned b,
                                        input int unsigned slot);
    logic [6:0] v;
    if (method == 1) v = 7'(b * VEC_PER_BRAM + slot);
    else             v = 7'((slot / 2) * N_SRF_SIDE + (slot % 2) * N_BRAM + b);
    return v;
  endfunction

endpackage
