// fme_pkg: shared types and constants of the HEVC fractional motion estimation (FME) core.
// Pixels are 8 bit. Hadamard coefficients of an 8x8 residual block (C8) are 15-bit signed,
// the width the coefficient SRAM word is built from (16 coefficients x 15 bit = 240 bit).
// The 8-tap half-pel filter taps are the HEVC luma half-sample taps.
package fme_pkg;
  localparam int PIX_W   = 8;
  localparam int COEF_W  = 15;           // C8 coefficient width
  localparam int COST_W  = 24;           // HAD cost width
  localparam int NUM_TC  = 5;            // transformed candidates (5T12S)
  localparam int NUM_SC  = 12;           // search candidates (5T12S)

  typedef logic [PIX_W-1:0]          pix_t;
  typedef logic signed [COEF_W-1:0]  coef_t;
  typedef logic [COST_W-1:0]         cost_t;

  // HEVC half-sample luma filter taps
  localparam int signed HTAP [8] = '{-1, 4, -11, 40, 40, -11, 4, -1};

  // 8-tap half-pel filter with rounding and clipping to 8 bit
  function automatic pix_t hpel8(input pix_t p0, p1, p2, p3, p4, p5, p6, p7);
    int s;
    s = -int'(p0) + 4*int'(p1) - 11*int'(p2) + 40*int'(p3) + 40*int'(p4)
        - 11*int'(p5) + 4*int'(p6) - int'(p7);
    s = (s + 32) >>> 6;
    if (s < 0) s = 0;
    if (s > 255) s = 255;
    return pix_t'(s);
  endfunction
endpackage
