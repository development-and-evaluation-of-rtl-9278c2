// cnn_ref_pkg: plain behavioural reference of the recognizer's arithmetic,
// written directly from the network definition (no BRAMs, no segmentation,
// no PE scheduling), used by the testbenches to check the RTL.
//   S1[f][Y][X] (Y,X = 0..27 over the whole image) = sat((sum |pix - w1|) >> 5)
//   C1, inside large field (LY,LX): min over 4x4 S1 windows at stride 2
//   S2[g][LY][LX] = sat((sum over the 64 C1 values |c1 - w2|) >> 6)
//   code[g][qy][qx] = min over 4x4 S2 windows at stride 2
package cnn_ref_pkg;

  typedef byte unsigned img_t  [1024];
  typedef byte unsigned w1_t   [4][25];
  typedef byte unsigned w2_t   [16][64];
  typedef byte unsigned s2_t   [16][100];
  typedef byte unsigned code_t [256];

  function automatic byte unsigned sat8(input int unsigned v, input int unsigned sh);
    int unsigned s = v >> sh;
    return (s > 255) ? 8'd255 : s[7:0];
  endfunction

  function automatic int unsigned absd(input int unsigned a, input int unsigned b);
    return (a > b) ? a - b : b - a;
  endfunction

  // S2 result of one large field.
  function automatic void large_field(input img_t img, input w1_t w1, input w2_t w2,
                                      input int ly, input int lx,
                                      output byte unsigned s2 [16]);
    byte unsigned s1 [4][10][10];
    byte unsigned c1 [64];
    for (int f = 0; f < 4; f++)
      for (int sy = 0; sy < 10; sy++)
        for (int sx = 0; sx < 10; sx++) begin
          int unsigned d = 0;
          for (int py = 0; py < 5; py++)
            for (int px = 0; px < 5; px++)
              d += absd(img[(2*ly + sy + py) * 32 + 2*lx + sx + px], w1[f][py*5 + px]);
          s1[f][sy][sx] = sat8(d, 5);
        end
    for (int f = 0; f < 4; f++)
      for (int cy = 0; cy < 4; cy++)
        for (int cx = 0; cx < 4; cx++) begin
          byte unsigned m = 255;
          for (int i = 0; i < 4; i++)
            for (int j = 0; j < 4; j++)
              if (s1[f][2*cy + i][2*cx + j] < m) m = s1[f][2*cy + i][2*cx + j];
          c1[f*16 + cy*4 + cx] = m;
        end
    for (int g = 0; g < 16; g++) begin
      int unsigned d = 0;
      for (int k = 0; k < 64; k++) d += absd(c1[k], w2[g][k]);
      s2[g] = sat8(d, 6);
    end
  endfunction

  function automatic void recognize(input img_t img, input w1_t w1, input w2_t w2,
                                    output s2_t s2, output code_t code);
    byte unsigned r [16];
    for (int ly = 0; ly < 10; ly++)
      for (int lx = 0; lx < 10; lx++) begin
        large_field(img, w1, w2, ly, lx, r);
        for (int g = 0; g < 16; g++) s2[g][ly*10 + lx] = r[g];
      end
    for (int g = 0; g < 16; g++)
      for (int qy = 0; qy < 4; qy++)
        for (int qx = 0; qx < 4; qx++) begin
          byte unsigned m = 255;
          for (int i = 0; i < 4; i++)
            for (int j = 0; j < 4; j++)
              if (s2[g][(2*qy + i)*10 + 2*qx + j] < m) m = s2[g][(2*qy + i)*10 + 2*qx + j];
          code[g*16 + qy*4 + qx] = m;
        end
  endfunction

endpackage
