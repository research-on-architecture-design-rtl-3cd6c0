// intra_dct8: H.264 8x8 forward integer transform and its SATD.
//
// Takes an 8x8 residual block (9-bit signed) and applies the 8x8 integer DCT of H.264 High
// profile, rows then columns, each pass with the standard butterfly of additions and
// shifts. The output is the coefficient block and the sum of the absolute coefficients, which
// the fine decision uses as its DCT-based SATD cost. Combinational; callers register.
//
// Coefficient growth: 9-bit input, the 1-D transform gains up to about 8x per pass in the
// worst case, so 16-bit coefficients hold the result of both passes.
module intra_dct8 (
  input  logic signed [8:0]  res  [64],   // res[8*y+x]
  output logic signed [15:0] coef [64],   // coef[8*v+u]
  output logic [21:0]        satd
);
  typedef logic signed [15:0] s16_t;

  function automatic void dct1(input s16_t p [8], output s16_t c [8]);
    s16_t a0, a1, a2, a3, a4, a5, a6, a7, b0, b1, b2, b3, b4, b5, b6, b7;
    a0 = p[0] + p[7]; a1 = p[1] + p[6]; a2 = p[2] + p[5]; a3 = p[3] + p[4];
    a4 = p[0] - p[7]; a5 = p[1] - p[6]; a6 = p[2] - p[5]; a7 = p[3] - p[4];
    b0 = a0 + a3; b1 = a1 + a2; b2 = a0 - a3; b3 = a1 - a2;
    b4 = a5 + a6 + ((a4 >>> 1) + a4);
    b5 = a4 - a7 - ((a6 >>> 1) + a6);
    b6 = a4 + a7 - ((a5 >>> 1) + a5);
    b7 = a5 - a6 + ((a7 >>> 1) + a7);
    c[0] = b0 + b1;
    c[4] = b0 - b1;
    c[2] = b2 + (b3 >>> 1);
    c[6] = (b2 >>> 1) - b3;
    c[1] = b4 + (b7 >>> 2);
    c[3] = b5 + (b6 >>> 2);
    c[5] = b6 - (b5 >>> 2);
    c[7] = (b4 >>> 2) - b7;
  endfunction

  always_comb begin
    s16_t tmp [8][8];
    s16_t v [8];
    s16_t w [8];
    for (int y = 0; y < 8; y++) begin
      for (int x = 0; x < 8; x++) v[x] = s16_t'(res[8*y+x]);
      dct1(v, w);
      for (int u = 0; u < 8; u++) tmp[y][u] = w[u];
    end
    satd = '0;
    for (int u = 0; u < 8; u++) begin
      for (int y = 0; y < 8; y++) v[y] = tmp[y][u];
      dct1(v, w);
      for (int q = 0; q < 8; q++) begin
        coef[8*q+u] = w[q];
        satd += (w[q] < 0) ? 22'(-w[q]) : 22'(w[q]);
      end
    end
  end
endmodule
